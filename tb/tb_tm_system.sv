// tb_tm_system - runs the time-multiplexed trigger at its full size (2 x 36
// Pre-Processors, 10 nodes of two Main-Processor cards) over 12 bunch
// crossings, so that every node is used and node 0 twice, and checks every
// card's report against the model in tm_exerciser. It also requires that
// the cluster across eta = 0 was found through the boundary links.
module tb_tm_system;
  import l1_pkg::*;
  logic clk = 0, rst = 1, bc0 = 0;
  always #5 clk = ~clk;
  logic [1:0][35:0][35:0][7:0] pp_in;
  logic bx_start;
  logic [11:0] bx;
  logic [9:0][1:0] gt_valid, link_error;
  logic [9:0][1:0][11:0] gt_bx, gt_count;
  logic [9:0][1:0][13:0] gt_et;
  logic [9:0][1:0][5:0] gt_eta;
  logic [9:0][1:0][6:0] gt_phi;
  int checks, failures, reports, boundary_wins, nodes_used;
  logic done;

  tm_system dut (.*);
  tm_exerciser #(.N_PP(36), .N_IN(36), .N_NODES(10), .N_BX(12)) ex (.*);

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (done);
    checks++;
    if (nodes_used != 10) begin failures++; $display("FAIL: %0d nodes used", nodes_used); end
    checks++;
    if (boundary_wins < 4) begin failures++; $display("FAIL: boundary cluster reported %0d times", boundary_wins); end
    $display("reports %0d boundary %0d nodes %0d", reports, boundary_wins, nodes_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
