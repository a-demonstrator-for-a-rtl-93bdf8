// tb_pattern_ram - loads a pattern through the control port, plays it back
// twice round the whole memory and then round a shorter loop (checking order, wrap and the one-clock read latency), then
// captures a stream of link words until the RAM is full and reads the
// capture back through the control port.
module tb_pattern_ram;
  import l1_pkg::*;
  localparam int unsigned DEPTH = 64, AW = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  ram_mode_e mode = RAM_IDLE;
  logic start = 0, ctl_we = 0;
  logic [31:0] din = 0, dout, ctl_wdata = 0, ctl_rdata;
  logic [AW-1:0] ctl_addr = 0, play_last = AW'(DEPTH - 1);
  logic dout_valid, full;
  int checks = 0, failures = 0;
  logic [31:0] pat [DEPTH];

  pattern_ram #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // load
    for (int a = 0; a < DEPTH; a++) begin
      pat[a] = $urandom;
      ctl_we = 1; ctl_addr = AW'(a); ctl_wdata = pat[a];
      @(negedge clk);
    end
    ctl_we = 0;
    // play: start, then two loops
    mode = RAM_PLAY; start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);       // first word appears one clock after address 0
    for (int i = 0; i < 2 * DEPTH; i++) begin
      check(dout_valid && dout == pat[i % DEPTH], $sformatf("play %0d: %h expected %h", i, dout, pat[i % DEPTH]));
      @(negedge clk);
    end
    // shorter loop: 0..22
    play_last = 22; start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      check(dout_valid && dout == pat[i % 23], $sformatf("short loop %0d: %h expected %h", i, dout, pat[i % 23]));
      @(negedge clk);
    end
    // capture
    mode = RAM_CAPTURE; start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < DEPTH + 10; i++) begin
      din = 32'hC0DE_0000 + 32'(i);
      @(negedge clk);
      if (i == DEPTH - 2) check(!full, "full too early");
    end
    check(full, "not full after DEPTH words");
    mode = RAM_IDLE;
    for (int a = 0; a < DEPTH; a++) begin
      ctl_addr = AW'(a);
      @(negedge clk);
      check(ctl_rdata == 32'hC0DE_0000 + 32'(a), $sformatf("capture %0d: %h", a, ctl_rdata));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
