// tb_pp_tmux - feeds a Pre-Processor time multiplexer with a random ring per
// bunch crossing on 36 byte links and checks every output link: bunch
// crossing n must go to node n mod 10 as a header (with its bx number) on
// the clock after its last input byte, then 54 data words holding the ring,
// then 5 idle clocks, so that each node gets a new frame every 60 clocks.
module tb_pp_tmux;
  import l1_pkg::*;
  localparam int unsigned NI = 36, NN = 10, CPB = 6, RW = 1728;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic bx_start;
  logic [11:0] bx;
  logic [NI-1:0][7:0] in_byte;
  logic [NN-1:0][31:0] out_word;
  logic [NN-1:0] out_hdr, out_valid;
  int checks = 0, failures = 0;

  pp_tmux #(.N_IN(NI), .N_NODES(NN)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // ring of each bunch crossing, towers {H,E} 24 bits, tower t at 24t
  logic [RW-1:0] ring_q [NN][$];
  int bx_q [NN][$];
  logic [RW-1:0] cur;
  int cyc = 0, sub = 0, bxn = 0, nbx = 0;
  int last_byte_cyc [NN][$];

  // drive on negedge
  initial begin
    in_byte = '0; bx_start = 0; bx = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    forever begin
      if (sub == 0) begin
        for (int t = 0; t < 72; t++) cur[24*t +: 24] = {12'($urandom), 12'($urandom)};
      end
      bx_start = (sub == 0);
      bx = 12'(bxn);
      for (int i = 0; i < NI; i++) in_byte[i] = cur[48*i + 8*sub +: 8];
      if (sub == CPB - 1) begin
        ring_q[nbx % NN].push_back(cur);
        bx_q[nbx % NN].push_back(bxn);
        last_byte_cyc[nbx % NN].push_back(cyc);
        nbx++;
        bxn = (bxn + 7) % 4096;     // any numbering: the header must repeat it
      end
      sub = (sub + 1) % CPB;
      @(negedge clk);
    end
  end

  // check on posedge (sampling values set at the previous negedge)
  int pos [NN];
  logic [RW-1:0] exp_ring [NN];
  int frames = 0;
  initial for (int k = 0; k < NN; k++) pos[k] = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst)
      for (int k = 0; k < NN; k++) begin
        if (out_hdr[k]) begin
          check(ring_q[k].size() > 0, $sformatf("node %0d: frame without data", k));
          if (ring_q[k].size() > 0) begin
            int b, lc;
            exp_ring[k] = ring_q[k].pop_front();
            b  = bx_q[k].pop_front();
            lc = last_byte_cyc[k].pop_front();
            check(out_word[k] == {8'hBC, 4'(k), 8'h00, 12'(b)}, $sformatf("node %0d header %h", k, out_word[k]));
            check(cyc == lc + 1, $sformatf("node %0d header at %0d, last byte at %0d", k, cyc, lc));
            check(pos[k] == -1 || pos[k] == 59, $sformatf("node %0d: frame spacing %0d", k, pos[k]));
            frames++;
          end
          pos[k] = 0;
        end else if (pos[k] >= 0) begin
          pos[k]++;
          if (pos[k] <= 54)
            check(out_valid[k] && out_word[k] == exp_ring[k][32*(pos[k]-1) +: 32],
                  $sformatf("node %0d word %0d: %h expected %h", k, pos[k], out_word[k], exp_ring[k][32*(pos[k]-1) +: 32]));
          else
            check(!out_valid[k], $sformatf("node %0d valid in idle slot %0d", k, pos[k]));
        end
      end
  end

  initial begin
    wait (frames >= 35);
    @(posedge clk);
    check(frames >= 35, "too few frames");
    $display("frames %0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
