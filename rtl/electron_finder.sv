// electron_finder - 2x2 electron clustering for a time-multiplexed trigger.
//
// In a time-multiplexed trigger one processor receives the whole calorimeter
// of one bunch crossing as a stream of rows of constant phi: every beat brings
// ROWS complete rows of N_ETA towers (ECAL and HCAL energies). The laboratory
// system delivers one row per clock, 72 clocks for the full phi circle; the
// Main-Processor cards of the time-multiplexed system take two rows per clock.
//
// The finder forms every overlapping 2x2 tower window: towers (eta, phi),
// (eta+1, phi), (eta, phi+1), (eta+1, phi+1), for eta = 0..N_ETA-2 and for
// every phi, with phi wrapping round (window 71 joins row 71 with row 0).
// Eta does not wrap. Per window it reports the ECAL sum, the HCAL sum and an
// electron flag. The row-at-a-time streaming and the 2x2 window follow the
// document; the flag is this design's choice of the simplest electron test:
// ECAL sum >= E_THRESH and HCAL sum <= ECAL sum >> H_SHIFT (hadronic veto).
// No local-maximum or overlap removal is done.
//
// Storage: the last row of the previous beat (to join beats) and the first
// row of the event (held until the last row arrives, for the phi wrap).
//
// Interface: in_valid marks a beat; in_first marks the beat that holds
// phi = 0..ROWS-1. Beats of one event must be consecutive in phi but may have
// gaps in time. The output has ROWS slots, each with its own valid and phi
// (the lower phi of its windows). Slot r of a beat holds the windows whose
// lower row is phi = beat*ROWS + r - 1; slot 0 of the first beat is empty and
// the wrap window (phi 71) comes out in slot 0 one clock after the result of
// the last beat. The next event may start on the very next clock, since
// its first beat leaves slot 0 free.
//
// Timing: outputs are registered, one clock after the beat.
module electron_finder #(
  parameter int unsigned N_ETA    = 24,
  parameter int unsigned N_PHI    = 72,
  parameter int unsigned TOWER_W  = 8,
  parameter int unsigned ROWS     = 1,
  parameter int unsigned E_THRESH = 8,
  parameter int unsigned H_SHIFT  = 3,
  localparam int unsigned SUM_W   = TOWER_W + 2,
  localparam int unsigned PHI_W   = $clog2(N_PHI),
  localparam int unsigned NWIN    = N_ETA - 1
) (
  input  logic                                      clk,
  input  logic                                      rst,
  input  logic                                      in_valid,
  input  logic                                      in_first,
  input  logic [ROWS-1:0][N_ETA-1:0][TOWER_W-1:0]   in_ecal,
  input  logic [ROWS-1:0][N_ETA-1:0][TOWER_W-1:0]   in_hcal,
  output logic [ROWS-1:0]                           out_valid,
  output logic [ROWS-1:0][PHI_W-1:0]                out_phi,
  output logic [ROWS-1:0][NWIN-1:0][SUM_W-1:0]      out_esum,
  output logic [ROWS-1:0][NWIN-1:0][SUM_W-1:0]      out_hsum,
  output logic [ROWS-1:0][NWIN-1:0]                 out_electron
);
  localparam int unsigned NBEATS = N_PHI / ROWS;
  localparam int unsigned BEAT_W = $clog2(NBEATS + 1);

  typedef logic [N_ETA-1:0][TOWER_W-1:0] row_t;

  row_t prev_e, prev_h;     // last row of the previous beat
  row_t first_e, first_h;   // row phi = 0 of the current event
  logic [BEAT_W-1:0] beat;  // index of the next beat within the event
  logic wrap_pend;          // the wrap window is due this clock

  logic [BEAT_W-1:0] cur_beat;
  logic              last_beat;
  always_comb begin
    cur_beat  = in_first ? '0 : beat;
    last_beat = in_valid && (cur_beat == BEAT_W'(NBEATS - 1));
  end

  // pairs of rows feeding each slot
  row_t lo_e [ROWS], lo_h [ROWS], hi_e [ROWS], hi_h [ROWS];
  logic [ROWS-1:0]            slot_v;
  logic [ROWS-1:0][PHI_W-1:0] slot_phi;

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      if (r == 0) begin
        lo_e[r] = prev_e;
        lo_h[r] = prev_h;
      end else begin
        lo_e[r] = in_ecal[r-1];
        lo_h[r] = in_hcal[r-1];
      end
      hi_e[r]     = in_ecal[r];
      hi_h[r]     = in_hcal[r];
      slot_v[r]   = in_valid && !(r == 0 && in_first);
      slot_phi[r] = PHI_W'(int'(cur_beat) * ROWS + r - 1);
    end
    if (wrap_pend) begin
      lo_e[0]     = prev_e;
      lo_h[0]     = prev_h;
      hi_e[0]     = first_e;
      hi_h[0]     = first_h;
      slot_v[0]   = 1'b1;
      slot_phi[0] = PHI_W'(N_PHI - 1);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      beat      <= '0;
      wrap_pend <= 1'b0;
      out_valid <= '0;
      prev_e    <= '0;
      prev_h    <= '0;
      first_e   <= '0;
      first_h   <= '0;
    end else begin
      wrap_pend <= last_beat;
      out_valid <= slot_v;
      if (in_valid) begin
        prev_e <= in_ecal[ROWS-1];
        prev_h <= in_hcal[ROWS-1];
        beat   <= last_beat ? '0 : cur_beat + 1'b1;
        if (in_first) begin
          first_e <= in_ecal[0];
          first_h <= in_hcal[0];
        end
      end
    end
  end

  // 2x2 sums and electron flag, registered
  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      out_phi[r] <= slot_phi[r];
      for (int k = 0; k < NWIN; k++) begin
        logic [SUM_W-1:0] es, hs;
        es = SUM_W'(lo_e[r][k]) + SUM_W'(lo_e[r][k+1]) + SUM_W'(hi_e[r][k]) + SUM_W'(hi_e[r][k+1]);
        hs = SUM_W'(lo_h[r][k]) + SUM_W'(lo_h[r][k+1]) + SUM_W'(hi_h[r][k]) + SUM_W'(hi_h[r][k+1]);
        out_esum[r][k]     <= es;
        out_hsum[r][k]     <= hs;
        out_electron[r][k] <= (es >= SUM_W'(E_THRESH)) && (hs <= (es >> H_SHIFT));
      end
    end
  end

  // a new event may only start when the wrap window slot is free
  assert property (@(posedge clk) disable iff (rst)
                   wrap_pend && in_valid |-> in_first)
    else $error("electron_finder: beat after the last row of an event is not a first beat");
endmodule
