// tb_link_aligner - links carry the same numbered frame stream, each with its
// own random skew. After `align` all outputs must carry the same word on
// the same clock, out_start must mark word 0 of a frame, and the latest link
// must pass with one clock of latency. Repeated with new skews.
module tb_link_aligner;
  localparam int unsigned NL = 6, W = 32, MS = 8, FRAME = 20;
  logic clk = 0, rst = 1, align = 0;
  always #5 clk = ~clk;
  logic [NL-1:0][W-1:0] in_data, out_data;
  logic [NL-1:0] in_start;
  logic out_start, aligned;
  logic [NL-1:0][2:0] delay;
  int checks = 0, failures = 0;

  link_aligner #(.N_LINKS(NL), .W(W), .MAX_SKEW(MS)) dut (.*);

  int skew [NL];
  int src = 0;                       // source word counter
  // link i sees source word (src - skew[i])
  always_comb
    for (int i = 0; i < NL; i++) begin
      int s;
      s = src - skew[i];
      in_data[i]  = {8'(i), 24'(s)};
      in_start[i] = (s >= 0) && (s % FRAME == 0);
    end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int round = 0; round < 4; round++) begin
      int maxsk = 0;
      for (int i = 0; i < NL; i++) begin
        skew[i] = (round == 0) ? i : $urandom % (MS - 1);
        if (skew[i] > maxsk) maxsk = skew[i];
      end
      src = 0;
      rst = (round == 0);
      repeat (2) @(negedge clk);
      rst = 0;
      align = 1;
      @(negedge clk); src++;
      align = 0;
      while (!aligned) begin @(negedge clk); src++; end
      for (int c = 0; c < 3 * FRAME; c++) begin
        int w0;
        w0 = int'(out_data[0][23:0]);
        for (int i = 0; i < NL; i++)
          check(out_data[i] == {8'(i), 24'(w0)}, $sformatf("round %0d link %0d: word %0d vs %0d", round, i, out_data[i][23:0], w0));
        check(out_start == (w0 % FRAME == 0), "out_start not on word 0");
        // total latency = latest skew + 1 register
        check(w0 == src - maxsk - 1, $sformatf("latency: word %0d at source %0d, max skew %0d", w0, src, maxsk));
        @(negedge clk); src++;
      end
    end
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
