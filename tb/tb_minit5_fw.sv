// tb_minit5_fw - end-to-end test of the demonstrator firmware with a short
// (144-word) pattern RAM and a 16-clock DAQ pipeline; demo_exerciser drives
// the links, the control ports and the Level-1 accepts and checks clusters,
// DAQ data, RAM capture and playback and the counter pattern. Every
// mechanism must have been exercised at least once.
module tb_minit5_fw;
  import l1_pkg::*;
  localparam int unsigned NL = 12, NE = 24, NWIN = 23, RAMD = 144, LAT = 16, WIN = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic bc0, align, aligned, ram_start, ram_we, l1a;
  logic [NL-1:0][31:0] rx_data, tx_data, daq_in_data;
  logic [NL-1:0] rx_start, ram_full;
  logic [NL-1:0][2:0] link_delay;
  src_sel_e alg_src, tx_src;
  ram_mode_e ram_mode;
  logic [3:0] ram_link;
  logic [7:0] ram_addr, ram_play_last;
  logic [31:0] ram_wdata, ram_rdata;
  logic [11:0] bx;
  logic [3:0] bx_sub;
  logic [1:0] daq_rd_en, daq_rd_last, daq_empty, daq_overflow;
  logic [NE-1:0][31:0] daq_out_data;
  logic [1:0][6:0] daq_events;
  logic [1:0][15:0] daq_l1a_lost;
  logic cl_valid;
  logic [6:0] cl_phi;
  logic [NWIN-1:0][9:0] cl_esum, cl_hsum;
  logic [NWIN-1:0] cl_electron;
  int checks, failures, seen_align, seen_link_loops, seen_daq_events, seen_l1a_lost,
      seen_capture, seen_ram_loops, seen_pattern_loops;
  logic done;

  minit5_fw #(.N_LINKS(NL), .RAM_DEPTH(RAMD), .DAQ_LAT(LAT), .DAQ_WIN(WIN), .DAQ_DEPTH(64)) dut (.*);
  demo_exerciser #(.NL(NL), .RAMD(RAMD), .LAT(LAT), .WIN(WIN)) ex (.*);

  int c = 0, f = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (done);
    c = checks; f = failures;
    $display("align %0d link loops %0d daq %0d lost %0d capture %0d ram loops %0d pattern loops %0d",
             seen_align, seen_link_loops, seen_daq_events, seen_l1a_lost, seen_capture, seen_ram_loops, seen_pattern_loops);
    c += 7;
    f += int'(seen_align == 0) + int'(seen_link_loops == 0) + int'(seen_daq_events == 0) + int'(seen_l1a_lost == 0)
       + int'(seen_capture == 0) + int'(seen_ram_loops == 0) + int'(seen_pattern_loops == 0);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
