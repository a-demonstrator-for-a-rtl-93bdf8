// minit5_fw - firmware of the MINI-T5 demonstrator card running the
// laboratory electron-finder system.
//
// Data flow, all at the 120 MHz fabric clock (three clocks per bunch
// crossing):
//   receivers -> link_aligner -> source select -> algorithm input array
//   -> electron_finder (2x2 clusters) -> cluster array
// with a DAQ capture unit and DAQ buffer on the algorithm input array and
// another pair on the cluster array, so that software can compare the
// algorithm's output with its input for the same events.
//
// The algorithm input, and the transmit data of the links, can come from the
// aligned receivers, from a pattern derived from the bunch-crossing counter,
// or from a pattern injection RAM per link; the same RAMs capture the aligned
// receiver data. These sources, the 32-bit link words and DAQ units before
// and after the algorithm follow the document.
//
// Each 32-bit link word carries two eta towers of one phi row: ECAL of tower
// 2i in bits 7:0, of tower 2i+1 in 15:8, HCAL of 2i in 23:16 and of 2i+1 in
// 31:24 (the byte order is this design's choice). With N_LINKS = 12 one clock
// loads a row of 24 eta towers and 72 clocks (24 bunch crossings) load the
// whole phi circle; a frame-start marker on the first row starts each loop.
// For the RAM source the loop starts with RAM word 0 and restarts every 72
// words; ram_play_last should end the pattern on a multiple of 72 words.
//
// The cluster DAQ array is N_LINKS*2 words: word k < N_ETA-1 is
// {11'b0, electron, hsum[9:0], esum[9:0]} of window k and the last word is
// {24'b0, valid, phi[6:0]}.
//
// Latency: link input to cluster output is the aligner delay + 1, one clock
// of source selection, one clock for the window after the row that
// completes it.
module minit5_fw
  import l1_pkg::*;
#(
  parameter int unsigned N_LINKS   = 12,
  parameter int unsigned RAM_DEPTH = 1024,
  parameter int unsigned DAQ_LAT   = 64,
  parameter int unsigned DAQ_WIN   = 3,
  parameter int unsigned DAQ_DEPTH = 64,
  parameter int unsigned E_THRESH  = 8,
  parameter int unsigned H_SHIFT   = 3,
  localparam int unsigned N_ETA    = 2 * N_LINKS,
  localparam int unsigned NWIN     = N_ETA - 1,
  localparam int unsigned SUM_W    = DEMO_TOWER_W + 2,
  localparam int unsigned RAW      = $clog2(RAM_DEPTH),
  localparam int unsigned LW       = (N_LINKS > 1) ? $clog2(N_LINKS) : 1,
  localparam int unsigned DAW      = $clog2(DAQ_DEPTH)
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            bc0,
  // receivers
  input  logic [N_LINKS-1:0][WORD_W-1:0]  rx_data,
  input  logic [N_LINKS-1:0]              rx_start,
  input  logic                            align,
  output logic                            aligned,
  output logic [N_LINKS-1:0][2:0]         link_delay,
  // transmitters
  output logic [N_LINKS-1:0][WORD_W-1:0]  tx_data,
  // control
  input  src_sel_e                        alg_src,
  input  src_sel_e                        tx_src,
  input  ram_mode_e                       ram_mode,
  input  logic                            ram_start,
  input  logic [RAW-1:0]                  ram_play_last,
  input  logic [LW-1:0]                   ram_link,
  input  logic                            ram_we,
  input  logic [RAW-1:0]                  ram_addr,
  input  logic [WORD_W-1:0]               ram_wdata,
  output logic [WORD_W-1:0]               ram_rdata,
  output logic [N_LINKS-1:0]              ram_full,
  output logic [BX_W-1:0]                 bx,
  output logic [3:0]                      bx_sub,
  // Level-1 accept and DAQ readout (0: algorithm input, 1: clusters)
  input  logic                            l1a,
  input  logic [1:0]                      daq_rd_en,
  output logic [N_LINKS-1:0][WORD_W-1:0]  daq_in_data,
  output logic [N_ETA-1:0][WORD_W-1:0]    daq_out_data,
  output logic [1:0]                      daq_rd_last,
  output logic [1:0]                      daq_empty,
  output logic [1:0]                      daq_overflow,
  output logic [1:0][DAW:0]               daq_events,
  output logic [1:0][15:0]                daq_l1a_lost,
  // clusters
  output logic                            cl_valid,
  output logic [PHI_W-1:0]                cl_phi,
  output logic [NWIN-1:0][SUM_W-1:0]      cl_esum,
  output logic [NWIN-1:0][SUM_W-1:0]      cl_hsum,
  output logic [NWIN-1:0]                 cl_electron
);
  // ---- receivers and alignment
  logic [N_LINKS-1:0][WORD_W-1:0] al_data;
  logic                           al_start;

  link_aligner #(.N_LINKS(N_LINKS), .W(WORD_W), .MAX_SKEW(8)) u_align (
    .clk, .rst, .align, .in_data(rx_data), .in_start(rx_start),
    .out_data(al_data), .out_start(al_start), .aligned, .delay(link_delay));

  // ---- bunch-crossing counter pattern
  logic                           pat_start;
  logic [N_LINKS-1:0][WORD_W-1:0] pattern;

  bx_pattern_gen #(.N_LINKS(N_LINKS), .CLK_PER_BX(DEMO_CLK_BX), .ORBIT(ORBIT_BX),
                   .FRAME_CLK(N_PHI)) u_bx (
    .clk, .rst, .bc0, .bx, .sub(bx_sub), .frame_start(pat_start), .pattern);

  // ---- pattern injection / capture RAMs
  logic [N_LINKS-1:0][WORD_W-1:0] ram_dout, ram_rd;
  logic [N_LINKS-1:0]             ram_dv;

  for (genvar i = 0; i < N_LINKS; i++) begin : g_ram
    pattern_ram #(.DEPTH(RAM_DEPTH), .W(WORD_W)) u_ram (
      .clk, .rst, .mode(ram_mode), .start(ram_start), .play_last(ram_play_last), .din(al_data[i]),
      .dout(ram_dout[i]), .dout_valid(ram_dv[i]), .full(ram_full[i]),
      .ctl_we(ram_we && (ram_link == LW'(i))), .ctl_addr(ram_addr),
      .ctl_wdata(ram_wdata), .ctl_rdata(ram_rd[i]));
  end
  assign ram_rdata = ram_rd[ram_link];

  // RAM playback frames: word 0, 72, 144, ... start a phi loop
  logic [PHI_W-1:0] ram_row;
  always_ff @(posedge clk) begin
    if (rst || ram_start) ram_row <= '0;
    else if (ram_dv[0])   ram_row <= (ram_row == PHI_W'(N_PHI - 1)) ? '0 : ram_row + 1'b1;
  end

  // ---- source selection (registered)
  logic [N_LINKS-1:0][WORD_W-1:0] alg_word;
  logic                           alg_first, alg_valid, running;

  always_ff @(posedge clk) begin
    if (rst) begin
      alg_word  <= '0;
      alg_first <= 1'b0;
      alg_valid <= 1'b0;
      running   <= 1'b0;
      tx_data   <= '0;
    end else begin
      tx_data <= (tx_src == SRC_RAM) ? ram_dout : pattern;
      unique case (alg_src)
        SRC_PATTERN: begin
          alg_word  <= pattern;
          alg_first <= pat_start;
          alg_valid <= running || pat_start;
          running   <= running || pat_start;
        end
        SRC_RAM: begin
          alg_word  <= ram_dout;
          alg_first <= ram_dv[0] && (ram_row == '0);
          alg_valid <= ram_dv[0] && (running || ram_row == '0);
          running   <= ram_dv[0] && (running || ram_row == '0);
        end
        default: begin
          alg_word  <= al_data;
          alg_first <= aligned && al_start;
          alg_valid <= aligned && (running || al_start);
          running   <= aligned && (running || al_start);
        end
      endcase
    end
  end

  // ---- unpack link words into eta towers
  logic [0:0][N_ETA-1:0][DEMO_TOWER_W-1:0] ecal, hcal;
  always_comb
    for (int i = 0; i < N_LINKS; i++) begin
      ecal[0][2*i]   = alg_word[i][7:0];
      ecal[0][2*i+1] = alg_word[i][15:8];
      hcal[0][2*i]   = alg_word[i][23:16];
      hcal[0][2*i+1] = alg_word[i][31:24];
    end

  // ---- algorithm
  logic [0:0]                      ef_valid;
  logic [0:0][PHI_W-1:0]           ef_phi;
  logic [0:0][NWIN-1:0][SUM_W-1:0] ef_esum, ef_hsum;
  logic [0:0][NWIN-1:0]            ef_el;

  electron_finder #(.N_ETA(N_ETA), .N_PHI(N_PHI), .TOWER_W(DEMO_TOWER_W), .ROWS(1),
                    .E_THRESH(E_THRESH), .H_SHIFT(H_SHIFT)) u_ef (
    .clk, .rst, .in_valid(alg_valid), .in_first(alg_first), .in_ecal(ecal), .in_hcal(hcal),
    .out_valid(ef_valid), .out_phi(ef_phi), .out_esum(ef_esum), .out_hsum(ef_hsum),
    .out_electron(ef_el));

  always_comb begin
    cl_valid    = ef_valid[0];
    cl_phi      = ef_phi[0];
    cl_esum     = ef_esum[0];
    cl_hsum     = ef_hsum[0];
    cl_electron = ef_el[0];
  end

  // ---- DAQ before and after the algorithm
  logic [N_ETA-1:0][WORD_W-1:0] cl_words;
  always_comb begin
    for (int k = 0; k < NWIN; k++)
      cl_words[k] = {11'b0, cl_electron[k], cl_hsum[k], cl_esum[k]};
    cl_words[N_ETA-1] = {24'b0, cl_valid, cl_phi};
  end

  logic                           cap_in_we, cap_in_last, cap_out_we, cap_out_last;
  logic [N_LINKS-1:0][WORD_W-1:0] cap_in_data;
  logic [N_ETA-1:0][WORD_W-1:0]   cap_out_data;
  logic [1:0]                     daq_full;

  daq_capture #(.N_WORDS(N_LINKS), .W(WORD_W), .LATENCY(DAQ_LAT), .WINDOW(DAQ_WIN)) u_cap_in (
    .clk, .rst, .din(alg_word), .l1a, .wr_en(cap_in_we), .wr_data(cap_in_data),
    .wr_last(cap_in_last), .l1a_lost(daq_l1a_lost[0]));
  daq_capture #(.N_WORDS(N_ETA), .W(WORD_W), .LATENCY(DAQ_LAT), .WINDOW(DAQ_WIN)) u_cap_out (
    .clk, .rst, .din(cl_words), .l1a, .wr_en(cap_out_we), .wr_data(cap_out_data),
    .wr_last(cap_out_last), .l1a_lost(daq_l1a_lost[1]));

  daq_buffer #(.W(N_LINKS * WORD_W), .DEPTH(DAQ_DEPTH)) u_buf_in (
    .clk, .rst, .wr_en(cap_in_we), .wr_data(cap_in_data), .wr_last(cap_in_last),
    .rd_en(daq_rd_en[0]), .rd_data(daq_in_data), .rd_last(daq_rd_last[0]),
    .empty(daq_empty[0]), .full(daq_full[0]), .overflow(daq_overflow[0]), .events(daq_events[0]));
  daq_buffer #(.W(N_ETA * WORD_W), .DEPTH(DAQ_DEPTH)) u_buf_out (
    .clk, .rst, .wr_en(cap_out_we), .wr_data(cap_out_data), .wr_last(cap_out_last),
    .rd_en(daq_rd_en[1]), .rd_data(daq_out_data), .rd_last(daq_rd_last[1]),
    .empty(daq_empty[1]), .full(daq_full[1]), .overflow(daq_overflow[1]), .events(daq_events[1]));
endmodule
