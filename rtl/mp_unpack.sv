// mp_unpack - receive side of one time-multiplexed link on a Main-Processor
// card: turns the 32-bit word stream of a frame back into phi towers.
//
// A frame (see pp_tmux) is a header word followed by 54 data words that hold
// the 72 towers of one eta ring, 24 bits each ({HCAL, ECAL}, 12 bits each),
// packed least significant first: four towers in every three words. The
// unpacker appends each data word to a bit accumulator and, whenever 48 bits
// (two towers) are present, emits them as one beat: phi 2b and 2b+1 in beat
// b, 36 beats per frame, two beats in every three words. The header restarts
// the accumulator and the beat count and supplies the frame's bunch-crossing
// number.
//
// The packing is this design's choice, matched to pp_tmux; the document only
// says that each Main-Processor receives one link per ring.
//
// Timing: a beat is registered, one clock after the word that completes it.
module mp_unpack
  import l1_pkg::*;
#(
  parameter int unsigned TOWER_W = TM_TOWER_W,
  parameter int unsigned N_PHI_T = N_PHI
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [WORD_W-1:0]          in_word,
  input  logic                       in_hdr,
  input  logic                       in_valid,
  output logic                       out_valid,
  output logic                       out_first,
  output logic [1:0][TOWER_W-1:0]    out_ecal,
  output logic [1:0][TOWER_W-1:0]    out_hcal,
  output logic [BX_W-1:0]            out_bx,
  output logic                       hdr_error
);
  localparam int unsigned BEAT_W = 4 * TOWER_W;              // two towers
  localparam int unsigned ACC_W  = BEAT_W + WORD_W;
  localparam int unsigned NBEATS = N_PHI_T / 2;
  localparam int unsigned BW     = $clog2(NBEATS + 1);

  logic [ACC_W-1:0] acc;
  logic [6:0]       nbits;
  logic [BW-1:0]    beat;
  logic             in_frame;

  logic [ACC_W-1:0] acc_new;
  logic [6:0]       nbits_new;
  always_comb begin
    acc_new   = acc | (ACC_W'(in_word) << nbits);
    nbits_new = nbits + 7'(WORD_W);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      nbits     <= '0;
      beat      <= '0;
      in_frame  <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_bx    <= '0;
      hdr_error <= 1'b0;
      out_ecal  <= '0;
      out_hcal  <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      if (in_valid && in_hdr) begin
        // a header must carry the marker
        hdr_error <= (in_word[31:24] != TM_HDR_MARK);
        out_bx    <= in_word[BX_W-1:0];
        acc       <= '0;
        nbits     <= '0;
        beat      <= '0;
        in_frame  <= 1'b1;
      end else if (in_valid && in_frame) begin
        if (nbits_new >= 7'(BEAT_W)) begin
          out_valid   <= 1'b1;
          out_first   <= (beat == '0);
          out_ecal[0] <= acc_new[0 +: TOWER_W];
          out_hcal[0] <= acc_new[TOWER_W +: TOWER_W];
          out_ecal[1] <= acc_new[2*TOWER_W +: TOWER_W];
          out_hcal[1] <= acc_new[3*TOWER_W +: TOWER_W];
          acc         <= acc_new >> BEAT_W;
          nbits       <= nbits_new - 7'(BEAT_W);
          beat        <= beat + 1'b1;
          if (beat == BW'(NBEATS - 1)) in_frame <= 1'b0;
        end else begin
          acc   <= acc_new;
          nbits <= nbits_new;
        end
      end
    end
  end
endmodule
