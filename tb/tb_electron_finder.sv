// tb_electron_finder - self-checking test of the 2x2 electron finder in the
// two shapes the design uses: one phi row of 24 eta towers (8-bit) per clock,
// as in the laboratory system, and two rows of 12-bit towers per clock, as
// in a Main-Processor card. Checks every window's sums and flag, the phi
// order including the wrap window, and that one phi loop takes 72 clocks
// (24 bunch crossings at 120 MHz) for one row per clock and 36 beats for two.
module tb_electron_finder;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int c1, f1, e1, v1, l1, c2, f2, e2, v2, l2;
  logic d1, d2;
  ef_harness #(.N_ETA(24), .TOWER_W(8),  .ROWS(1)) h1 (.clk, .rst, .checks(c1), .failures(f1),
    .electrons(e1), .vetoed(v1), .load_clocks(l1), .done(d1));
  ef_harness #(.N_ETA(10), .TOWER_W(12), .ROWS(2)) h2 (.clk, .rst, .checks(c2), .failures(f2),
    .electrons(e2), .vetoed(v2), .load_clocks(l2), .done(d2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (d1 && d2);
    checks += c1 + c2;
    failures += f1 + f2;
    check(l1 == 72, $sformatf("one row per clock: phi loop took %0d clocks, expected 72", l1));
    // two rows per clock: 36 beats; phi 0 already comes out with the first beat
    // and the wrap window one clock after the last, so the span is 37 clocks
    check(l2 == 37, $sformatf("two rows per clock: phi loop took %0d clocks, expected 37", l2));
    check(e1 > 0 && e2 > 0, "electron flag never set");
    check(v1 > 0 && v2 > 0, "hadronic veto never applied");
    check(h1.chk_ev == 6 && h2.chk_ev == 6, "not all events reported");
    $display("electrons %0d/%0d vetoed %0d/%0d", e1, e2, v1, v2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
