// tb_l1_trigger_top - end-to-end test of the whole design at its default
// sizes: the 12-link demonstrator (1024-word pattern RAMs, 64-clock DAQ
// pipeline) and the full time-multiplexed system (2 x 36 Pre-Processors,
// 10 Main-Processor nodes). demo_exerciser and tm_exerciser drive and check
// the two parts, each on its own clock. Every mechanism must happen at least
// once: link alignment, phi loops from links, RAM and counter pattern, DAQ
// readout, a lost Level-1 accept, RAM capture, all ten nodes in the round
// robin and a cluster found through the eta-boundary links.
module tb_l1_trigger_top;
  import l1_pkg::*;
  localparam int unsigned NL = 12, NE = 24, NWIN = 23;
  logic clk120 = 0, clk240 = 0, rst120 = 1, rst240 = 1;
  always #4 clk120 = ~clk120;
  always #2 clk240 = ~clk240;

  // demonstrator
  logic demo_bc0, demo_align, demo_aligned, demo_ram_start, demo_ram_we, demo_l1a;
  logic [NL-1:0][31:0] demo_rx_data, demo_tx_data, demo_daq_in_data;
  logic [NL-1:0] demo_rx_start, demo_ram_full;
  logic [NL-1:0][2:0] demo_link_delay;
  src_sel_e demo_alg_src, demo_tx_src;
  ram_mode_e demo_ram_mode;
  logic [3:0] demo_ram_link;
  logic [9:0] demo_ram_addr, demo_ram_play_last;
  logic [31:0] demo_ram_wdata, demo_ram_rdata;
  logic [11:0] demo_bx;
  logic [3:0] demo_bx_sub;
  logic [1:0] demo_daq_rd_en, demo_daq_rd_last, demo_daq_empty, demo_daq_overflow;
  logic [NE-1:0][31:0] demo_daq_out_data;
  logic [1:0][6:0] demo_daq_events;
  logic [1:0][15:0] demo_daq_l1a_lost;
  logic demo_cl_valid;
  logic [6:0] demo_cl_phi;
  logic [NWIN-1:0][9:0] demo_cl_esum, demo_cl_hsum;
  logic [NWIN-1:0] demo_cl_electron;
  // time-multiplexed system
  logic tm_bc0 = 0;
  logic [1:0][35:0][35:0][7:0] tm_pp_in;
  logic tm_bx_start;
  logic [11:0] tm_bx;
  logic [9:0][1:0] tm_gt_valid, tm_link_error;
  logic [9:0][1:0][11:0] tm_gt_bx, tm_gt_count;
  logic [9:0][1:0][13:0] tm_gt_et;
  logic [9:0][1:0][5:0] tm_gt_eta;
  logic [9:0][1:0][6:0] tm_gt_phi;

  l1_trigger_top dut (.*);

  int d_checks, d_failures, seen_align, seen_link_loops, seen_daq_events, seen_l1a_lost,
      seen_capture, seen_ram_loops, seen_pattern_loops;
  logic d_done;
  demo_exerciser #(.NL(NL), .RAMD(1024), .LAT(64), .WIN(3)) dex (
    .clk(clk120), .rst(rst120), .bc0(demo_bc0), .rx_data(demo_rx_data), .rx_start(demo_rx_start),
    .align(demo_align), .aligned(demo_aligned), .link_delay(demo_link_delay), .tx_data(demo_tx_data),
    .alg_src(demo_alg_src), .tx_src(demo_tx_src), .ram_mode(demo_ram_mode), .ram_start(demo_ram_start),
    .ram_play_last(demo_ram_play_last), .ram_link(demo_ram_link), .ram_we(demo_ram_we),
    .ram_addr(demo_ram_addr), .ram_wdata(demo_ram_wdata), .ram_rdata(demo_ram_rdata),
    .ram_full(demo_ram_full), .bx(demo_bx), .bx_sub(demo_bx_sub), .l1a(demo_l1a),
    .daq_rd_en(demo_daq_rd_en), .daq_in_data(demo_daq_in_data), .daq_out_data(demo_daq_out_data),
    .daq_rd_last(demo_daq_rd_last), .daq_empty(demo_daq_empty), .daq_overflow(demo_daq_overflow),
    .daq_events(demo_daq_events), .daq_l1a_lost(demo_daq_l1a_lost), .cl_valid(demo_cl_valid),
    .cl_phi(demo_cl_phi), .cl_esum(demo_cl_esum), .cl_hsum(demo_cl_hsum), .cl_electron(demo_cl_electron),
    .checks(d_checks), .failures(d_failures), .seen_align, .seen_link_loops, .seen_daq_events,
    .seen_l1a_lost, .seen_capture, .seen_ram_loops, .seen_pattern_loops, .done(d_done));

  int t_checks, t_failures, reports, boundary_wins, nodes_used;
  logic t_done;
  tm_exerciser #(.N_PP(36), .N_IN(36), .N_NODES(10), .N_BX(12)) tex (
    .clk(clk240), .rst(rst240), .pp_in(tm_pp_in), .bx_start(tm_bx_start), .bx(tm_bx),
    .gt_valid(tm_gt_valid), .gt_bx(tm_gt_bx), .gt_et(tm_gt_et), .gt_eta(tm_gt_eta),
    .gt_phi(tm_gt_phi), .gt_count(tm_gt_count), .link_error(tm_link_error),
    .checks(t_checks), .failures(t_failures), .reports, .boundary_wins, .nodes_used, .done(t_done));

  int checks = 0, failures = 0;
  task automatic mech(int n, string what);
    checks++;
    $display("  %-32s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk120);
    rst120 = 0;
    rst240 = 0;
    wait (d_done && t_done);
    checks += d_checks + t_checks;
    failures += d_failures + t_failures;
    $display("mechanisms exercised:");
    mech(seen_align, "link alignment");
    mech(seen_link_loops, "phi loops from links");
    mech(seen_daq_events, "DAQ events read out");
    mech(seen_l1a_lost, "Level-1 accepts lost (busy)");
    mech(seen_capture, "RAM captures");
    mech(seen_ram_loops, "phi loops from RAM");
    mech(seen_pattern_loops, "phi loops from bx pattern");
    mech(reports, "MP reports");
    mech(int'(nodes_used == 10), "all 10 nodes used");
    mech(boundary_wins, "boundary clusters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk120);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
