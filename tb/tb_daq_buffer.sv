// tb_daq_buffer - writes events of random length with random read-out
// pressure, compares every word read with a reference queue, checks the
// event count, then fills the buffer past full to see the overflow flag.
module tb_daq_buffer;
  localparam int unsigned W = 40, DEPTH = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_last = 0, rd_en = 0;
  logic [W-1:0] wr_data = 0, rd_data;
  logic rd_last, empty, full, overflow;
  logic [4:0] events;
  int checks = 0, failures = 0;

  daq_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W:0] q[$];
  int ev_model = 0, fulls = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 600; i++) begin
      // drive
      wr_en = ($urandom % 2) && (q.size() < DEPTH);
      wr_data = {$urandom, 8'($urandom)};
      wr_last = ($urandom % 3 == 0);
      rd_en = !empty && ($urandom % 2);
      #1;
      check(empty == (q.size() == 0), "empty flag");
      if (rd_en && q.size() > 0) begin
        logic [W:0] e;
        e = q.pop_front();
        check({rd_last, rd_data} == e, $sformatf("read %h expected %h", {rd_last, rd_data}, e));
        if (e[W]) ev_model--;
      end
      @(posedge clk);
      if (wr_en) begin q.push_back({wr_last, wr_data}); if (wr_last) ev_model++; end
      if (full) fulls++;
      @(negedge clk);
      check(int'(events) == ev_model, $sformatf("events %0d expected %0d", events, ev_model));
    end
    // overflow
    rd_en = 0;
    check(!overflow, "overflow set early");
    wr_en = 1;
    repeat (DEPTH + 2) @(negedge clk);
    wr_en = 0;
    check(full && overflow, "overflow not flagged");
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
