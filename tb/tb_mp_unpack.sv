// tb_mp_unpack - sends frames (header + 54 words holding 72 packed 24-bit
// towers) with random gaps between words and checks that 36 beats of two
// towers come out in phi order, the first flagged, with the header's bx,
// and that a header without the marker is flagged.
module tb_mp_unpack;
  import l1_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] in_word = 0;
  logic in_hdr = 0, in_valid = 0;
  logic out_valid, out_first, hdr_error;
  logic [1:0][11:0] out_ecal, out_hcal;
  logic [11:0] out_bx;
  int checks = 0, failures = 0;

  mp_unpack dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [1727:0] ring;
  int beat = 0, frames_done = 0;
  int cur_bx = 0;
  always @(posedge clk)
    if (!rst && out_valid) begin
      check(out_first == (beat == 0), "first flag");
      check(out_bx == 12'(cur_bx), "bx");
      for (int j = 0; j < 2; j++) begin
        int t;
        t = 2 * beat + j;
        check(out_ecal[j] == ring[24*t +: 12] && out_hcal[j] == ring[24*t + 12 +: 12],
              $sformatf("tower %0d: %h/%h expected %h", t, out_ecal[j], out_hcal[j], ring[24*t +: 24]));
      end
      beat++;
      if (beat == 36) begin beat = 0; frames_done++; end
    end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 5; f++) begin
      for (int t = 0; t < 72; t++) ring[24*t +: 24] = 24'($urandom);
      cur_bx = $urandom % 3564;
      in_valid = 1; in_hdr = 1; in_word = {8'hBC, 12'h000, 12'(cur_bx)};
      @(negedge clk);
      in_hdr = 0;
      for (int w = 0; w < 54; w++) begin
        while (f % 2 == 1 && $urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_word = ring[32*w +: 32];
        @(negedge clk);
      end
      in_valid = 0;
      repeat (5) @(negedge clk);
      check(!hdr_error, "header error on a good header");
    end
    // bad header
    in_valid = 1; in_hdr = 1; in_word = 32'h1200_0000;
    @(negedge clk);
    in_valid = 0; in_hdr = 0;
    @(negedge clk);
    check(hdr_error, "bad header not flagged");
    check(frames_done == 5, $sformatf("%0d frames unpacked", frames_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
