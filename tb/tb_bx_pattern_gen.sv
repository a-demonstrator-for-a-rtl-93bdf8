// tb_bx_pattern_gen - checks the bunch-crossing counter against a counter
// kept here: bx advances every CLK_PER_BX clocks, wraps at the orbit length,
// restarts on bc0, frame_start comes every FRAME_CLK clocks, and every
// link's pattern word carries link index, sub-bx, frame clock and bx.
module tb_bx_pattern_gen;
  import l1_pkg::*;
  localparam int unsigned NL = 4, CPB = 3, ORB = 20, FR = 9;
  logic clk = 0, rst = 1, bc0 = 0;
  always #5 clk = ~clk;
  logic [BX_W-1:0] bx;
  logic [3:0] sub;
  logic frame_start;
  logic [NL-1:0][WORD_W-1:0] pattern;
  int checks = 0, failures = 0;
  int wraps = 0, resyncs = 0;

  bx_pattern_gen #(.N_LINKS(NL), .CLK_PER_BX(CPB), .ORBIT(ORB), .FRAME_CLK(FR)) dut (.*);

  int m_bx = 0, m_sub = 0, m_f = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 400; c++) begin
      // compare at this clock
      checks++;
      if (int'(bx) != m_bx || int'(sub) != m_sub || frame_start != (m_f == 0)) begin
        failures++;
        $display("clk %0d: bx %0d sub %0d fs %0b, expected %0d %0d %0b", c, bx, sub, frame_start, m_bx, m_sub, m_f == 0);
      end
      for (int i = 0; i < NL; i++) begin
        checks++;
        if (pattern[i] != {8'(i), 4'(m_sub), 8'(m_f), 12'(m_bx)}) begin
          failures++;
          $display("clk %0d link %0d: pattern %h", c, i, pattern[i]);
        end
      end
      bc0 = (c == 250);
      @(negedge clk);
      if (bc0) begin
        m_bx = 0; m_sub = 0; m_f = 0; resyncs++;
      end else begin
        m_f = (m_f + 1) % FR;
        if (m_sub == CPB - 1) begin
          m_sub = 0;
          if (m_bx == ORB - 1) begin m_bx = 0; wraps++; end else m_bx++;
        end else m_sub++;
      end
    end
    checks++;
    if (wraps < 2 || resyncs != 1) begin failures++; $display("orbit wrap or bc0 not exercised"); end
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
