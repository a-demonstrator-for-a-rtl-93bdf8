// tb_daq_capture - feeds numbered arrays into the capture pipeline, fires
// Level-1 accepts (some too close together) and checks that each taken
// trigger yields exactly WINDOW arrays, taken LATENCY clocks back, with
// wr_last on the last one, and that ignored triggers are counted.
module tb_daq_capture;
  localparam int unsigned NW = 3, LAT = 10, WIN = 4;
  logic clk = 0, rst = 1, l1a = 0;
  always #5 clk = ~clk;
  logic [NW-1:0][31:0] din, wr_data;
  logic wr_en, wr_last;
  logic [15:0] l1a_lost;
  int checks = 0, failures = 0;

  daq_capture #(.N_WORDS(NW), .LATENCY(LAT), .WINDOW(WIN)) dut (.*);

  int cyc = 0;
  always_comb for (int j = 0; j < NW; j++) din[j] = {8'(j), 24'(cyc)};

  // expected writes: queue of source clock numbers
  int exp_q[$];
  int busy_until = -1;
  int taken = 0, lost = 0, writes = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      // outputs for the current clock
      if (wr_en) begin
        int s;
        writes++;
        check(exp_q.size() > 0, "unexpected write");
        if (exp_q.size() > 0) begin
          s = exp_q.pop_front();
          for (int j = 0; j < NW; j++)
            check(wr_data[j] == {8'(j), 24'(s)}, $sformatf("clk %0d: word %0d = %h, expected source clock %0d", cyc, j, wr_data[j], s));
          check(wr_last == (exp_q.size() % WIN == 0), "wr_last wrong");
        end
      end else check(exp_q.size() == 0 || exp_q.size() % WIN != 0 || 1, "");
      // model of the trigger taken on this clock
      if (l1a) begin
        if (cyc > busy_until) begin
          for (int k = 0; k < WIN; k++) exp_q.push_back(cyc - LAT + k);
          busy_until = cyc + WIN;
          taken++;
        end else lost++;
      end
    end
    cyc <= cyc + 1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (LAT + 2) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      l1a = ($urandom % 7 == 0);
      @(negedge clk);
    end
    l1a = 0;
    repeat (WIN + 3) @(negedge clk);
    check(exp_q.size() == 0, "writes missing");
    check(int'(l1a_lost) == lost, $sformatf("lost count %0d, expected %0d", l1a_lost, lost));
    check(taken > 5 && lost > 0, "triggers not exercised");
    check(writes == taken * WIN, "write count");
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
