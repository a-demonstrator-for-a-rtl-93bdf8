// l1_trigger_top - a time-multiplexed Level-1 calorimeter trigger: the
// laboratory demonstrator and the full system it prototypes, side by side.
//
//  * minit5_fw (120 MHz): firmware of the MINI-T5 demonstrator card.
//    DEMO_LINKS = 12 links of 32-bit words bring one phi row of 24 eta towers
//    per clock into a 2x2 electron finder, with pattern sources, capture RAMs
//    and DAQ capture before and after the algorithm.
//  * tm_system (240 MHz): 2 x 36 Pre-Processor cards sending each bunch
//    crossing to one of 10 Main-Processor nodes in turn, each node running
//    the same 2x2 electron finder on a whole half of the calorimeter.
//
// The two parts share no signals; each has its own clock, reset and ports.
// Their structure follows the document; see the modules for what is this
// design's own choice.
module l1_trigger_top
  import l1_pkg::*;
#(
  parameter int unsigned DEMO_LINKS = 12,
  parameter int unsigned RAM_DEPTH  = 1024,
  parameter int unsigned N_PP       = 36,
  parameter int unsigned N_IN       = 36,
  parameter int unsigned N_NODES    = TM_N_NODES,
  parameter int unsigned N_HF       = 8,
  localparam int unsigned N_ETA     = 2 * DEMO_LINKS,
  localparam int unsigned NWIN      = N_ETA - 1,
  localparam int unsigned DSUM_W    = DEMO_TOWER_W + 2,
  localparam int unsigned TSUM_W    = TM_TOWER_W + 2,
  localparam int unsigned RAW       = $clog2(RAM_DEPTH),
  localparam int unsigned LW        = (DEMO_LINKS > 1) ? $clog2(DEMO_LINKS) : 1,
  localparam int unsigned EW        = $clog2(N_PP + 4 + N_HF)
) (
  // ---- demonstrator
  input  logic                               clk120,
  input  logic                               rst120,
  input  logic                               demo_bc0,
  input  logic [DEMO_LINKS-1:0][WORD_W-1:0]  demo_rx_data,
  input  logic [DEMO_LINKS-1:0]              demo_rx_start,
  input  logic                               demo_align,
  output logic                               demo_aligned,
  output logic [DEMO_LINKS-1:0][2:0]         demo_link_delay,
  output logic [DEMO_LINKS-1:0][WORD_W-1:0]  demo_tx_data,
  input  src_sel_e                           demo_alg_src,
  input  src_sel_e                           demo_tx_src,
  input  ram_mode_e                          demo_ram_mode,
  input  logic                               demo_ram_start,
  input  logic [RAW-1:0]                     demo_ram_play_last,
  input  logic [LW-1:0]                      demo_ram_link,
  input  logic                               demo_ram_we,
  input  logic [RAW-1:0]                     demo_ram_addr,
  input  logic [WORD_W-1:0]                  demo_ram_wdata,
  output logic [WORD_W-1:0]                  demo_ram_rdata,
  output logic [DEMO_LINKS-1:0]              demo_ram_full,
  output logic [BX_W-1:0]                    demo_bx,
  output logic [3:0]                         demo_bx_sub,
  input  logic                               demo_l1a,
  input  logic [1:0]                         demo_daq_rd_en,
  output logic [DEMO_LINKS-1:0][WORD_W-1:0]  demo_daq_in_data,
  output logic [N_ETA-1:0][WORD_W-1:0]       demo_daq_out_data,
  output logic [1:0]                         demo_daq_rd_last,
  output logic [1:0]                         demo_daq_empty,
  output logic [1:0]                         demo_daq_overflow,
  output logic [1:0][6:0]                    demo_daq_events,
  output logic [1:0][15:0]                   demo_daq_l1a_lost,
  output logic                               demo_cl_valid,
  output logic [PHI_W-1:0]                   demo_cl_phi,
  output logic [NWIN-1:0][DSUM_W-1:0]        demo_cl_esum,
  output logic [NWIN-1:0][DSUM_W-1:0]        demo_cl_hsum,
  output logic [NWIN-1:0]                    demo_cl_electron,
  // ---- time-multiplexed system
  input  logic                               clk240,
  input  logic                               rst240,
  input  logic                               tm_bc0,
  input  logic [1:0][N_PP-1:0][N_IN-1:0][7:0] tm_pp_in,
  output logic                               tm_bx_start,
  output logic [BX_W-1:0]                    tm_bx,
  output logic [N_NODES-1:0][1:0]            tm_gt_valid,
  output logic [N_NODES-1:0][1:0][BX_W-1:0]  tm_gt_bx,
  output logic [N_NODES-1:0][1:0][TSUM_W-1:0] tm_gt_et,
  output logic [N_NODES-1:0][1:0][EW-1:0]    tm_gt_eta,
  output logic [N_NODES-1:0][1:0][PHI_W-1:0] tm_gt_phi,
  output logic [N_NODES-1:0][1:0][11:0]      tm_gt_count,
  output logic [N_NODES-1:0][1:0]            tm_link_error
);
  minit5_fw #(.N_LINKS(DEMO_LINKS), .RAM_DEPTH(RAM_DEPTH)) u_demo (
    .clk(clk120), .rst(rst120), .bc0(demo_bc0),
    .rx_data(demo_rx_data), .rx_start(demo_rx_start), .align(demo_align),
    .aligned(demo_aligned), .link_delay(demo_link_delay), .tx_data(demo_tx_data),
    .alg_src(demo_alg_src), .tx_src(demo_tx_src), .ram_mode(demo_ram_mode),
    .ram_start(demo_ram_start), .ram_play_last(demo_ram_play_last), .ram_link(demo_ram_link), .ram_we(demo_ram_we),
    .ram_addr(demo_ram_addr), .ram_wdata(demo_ram_wdata), .ram_rdata(demo_ram_rdata),
    .ram_full(demo_ram_full), .bx(demo_bx), .bx_sub(demo_bx_sub),
    .l1a(demo_l1a), .daq_rd_en(demo_daq_rd_en), .daq_in_data(demo_daq_in_data),
    .daq_out_data(demo_daq_out_data), .daq_rd_last(demo_daq_rd_last),
    .daq_empty(demo_daq_empty), .daq_overflow(demo_daq_overflow),
    .daq_events(demo_daq_events), .daq_l1a_lost(demo_daq_l1a_lost),
    .cl_valid(demo_cl_valid), .cl_phi(demo_cl_phi), .cl_esum(demo_cl_esum),
    .cl_hsum(demo_cl_hsum), .cl_electron(demo_cl_electron));

  tm_system #(.N_PP(N_PP), .N_IN(N_IN), .N_NODES(N_NODES), .N_BOUND(4), .N_HF(N_HF)) u_tm (
    .clk(clk240), .rst(rst240), .bc0(tm_bc0), .pp_in(tm_pp_in),
    .bx_start(tm_bx_start), .bx(tm_bx),
    .gt_valid(tm_gt_valid), .gt_bx(tm_gt_bx), .gt_et(tm_gt_et), .gt_eta(tm_gt_eta),
    .gt_phi(tm_gt_phi), .gt_count(tm_gt_count), .link_error(tm_link_error));
endmodule
