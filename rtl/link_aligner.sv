// link_aligner - low-latency alignment of link words from fibres of
// different lengths.
//
// Every link carries a frame-start marker (in_start, e.g. decoded from a
// control character) at the same point of its data stream. Because the
// fibres and receivers differ, the markers arrive on different clocks. When
// `align` is pulsed, the aligner watches the next markers: it counts clocks
// from the first marker it sees and notes on which clock each link's marker
// arrives. When every link has shown its marker, each link gets a delay equal
// to the latest arrival minus its own, so the latest link passes with the
// smallest delay. If not all markers arrive within MAX_SKEW clocks the
// attempt is dropped and the next markers are used.
//
// Data path: each link feeds a shift register of MAX_SKEW words; the output
// is one tap of it, chosen by the learned delay: one register plus one
// multiplexer, so the slowest link sees a single clock of latency. That the
// alignment exists and is low-latency follows the document; the marker
// framing, the learning procedure and the skew range are this design's.
//
// Interface: out_data[i] is in_data[i] delayed by delay[i] + 1 clocks;
// out_start is link 0's marker after the same delay, and so marks the frame
// start of all links once `aligned` is high.
module link_aligner
  import l1_pkg::*;
#(
  parameter int unsigned N_LINKS  = 12,
  parameter int unsigned W        = WORD_W,
  parameter int unsigned MAX_SKEW = 8,
  localparam int unsigned DW      = $clog2(MAX_SKEW)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      align,
  input  logic [N_LINKS-1:0][W-1:0] in_data,
  input  logic [N_LINKS-1:0]        in_start,
  output logic [N_LINKS-1:0][W-1:0] out_data,
  output logic                      out_start,
  output logic                      aligned,
  output logic [N_LINKS-1:0][DW-1:0] delay
);
  typedef enum logic [1:0] {IDLE, WAIT_FIRST, LEARN} state_e;
  state_e state;

  logic [N_LINKS-1:0][DW-1:0] arr;    // arrival clock of each marker
  logic [N_LINKS-1:0]         seen;
  logic [DW-1:0]              t;
  logic [N_LINKS-1:0]         seen_now;
  logic                       all_seen;

  always_comb begin
    seen_now = seen | in_start;
    all_seen = &seen_now;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      aligned <= 1'b0;
      seen    <= '0;
      t       <= '0;
      arr     <= '0;
      delay   <= '0;
    end else begin
      case (state)
        IDLE: if (align) begin
          state   <= WAIT_FIRST;
          aligned <= 1'b0;
        end
        WAIT_FIRST, LEARN: begin
          if ((state == WAIT_FIRST && |in_start) || state == LEARN) begin
            // clock t of the learning window
            for (int i = 0; i < N_LINKS; i++)
              if (in_start[i] && !seen[i]) arr[i] <= (state == WAIT_FIRST) ? '0 : t;
            if (all_seen) begin
              for (int i = 0; i < N_LINKS; i++) begin
                logic [DW-1:0] ti;
                ti = seen[i] ? arr[i] : ((state == WAIT_FIRST) ? '0 : t);
                delay[i] <= ((state == WAIT_FIRST) ? '0 : t) - ti;
              end
              aligned <= 1'b1;
              seen    <= '0;
              state   <= IDLE;
            end else if (state == LEARN && t == DW'(MAX_SKEW - 1)) begin
              seen  <= '0;      // skew too large: try the next markers
              state <= WAIT_FIRST;
            end else begin
              seen  <= seen_now;
              t     <= (state == WAIT_FIRST) ? DW'(1) : t + 1'b1;
              state <= LEARN;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // delay lines
  logic [N_LINKS-1:0][MAX_SKEW-1:0][W-1:0] sr;
  logic [N_LINKS-1:0][MAX_SKEW-1:0]        ss;
  always_ff @(posedge clk) begin
    for (int i = 0; i < N_LINKS; i++) begin
      sr[i] <= {sr[i][MAX_SKEW-2:0], in_data[i]};
      ss[i] <= {ss[i][MAX_SKEW-2:0], in_start[i]};
    end
  end

  always_comb begin
    for (int i = 0; i < N_LINKS; i++) out_data[i] = sr[i][delay[i]];
    out_start = ss[0][delay[0]];
  end
endmodule
