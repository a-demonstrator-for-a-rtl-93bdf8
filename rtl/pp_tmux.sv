// pp_tmux - Pre-Processor time multiplexer.
//
// A Pre-Processor card receives, every bunch crossing, one ring of the
// calorimeter: 72 phi towers of one eta, each with a 12-bit ECAL and a
// 12-bit HCAL energy, 1728 bits in all, over N_IN = 36 input links
// (2.4 Gb/s, 8b/10b, i.e. one byte per link per 240 MHz clock, six clocks
// per bunch crossing). It sends all the data of one bunch crossing to one
// Main-Processor node, over a single output link, and serves the N_NODES
// nodes in turn: bunch crossing n goes to node n mod N_NODES, spread over
// N_NODES bunch crossings. An output link of 9.6 Gb/s with 8b/10b carries a
// 32-bit word per 240 MHz clock, i.e. 60 words per 10 bunch crossings, of
// which a frame uses 55: one header word and 54 data words.
//
// Input layout (this design's choice): link i carries phi towers 2i and
// 2i+1; byte s (clock s = 0..5 of the bunch crossing, counted from
// bx_start) is bits 8s+7:8s of {HCAL(2i+1), ECAL(2i+1), HCAL(2i), ECAL(2i)}.
// Output frame: header {8'hBC, node[3:0], 8'h00, bx[11:0]}, then the 1728-bit
// ring, tower t in bits 24t+23:24t as {HCAL, ECAL}, cut into 54 words,
// least significant first; then five idle clocks (out_valid low).
//
// Structure: the six bytes of each link are gathered; on the sixth clock
// the whole ring is copied into the frame buffer of the node whose turn it
// is, and that node's output starts its frame on the next clock. A frame
// lasts exactly N_NODES bunch crossings, so each node buffer is free again
// just when its next ring arrives. The round-robin counter runs freely from
// reset, so every Pre-Processor must be reset together. The time
// multiplexing, the link counts and rates and the 12-bit towers follow the
// document; the word layouts are this design's.
//
// Timing: header on the clock after the last input byte of the bunch
// crossing; data word w (1..54) w clocks later.
module pp_tmux
  import l1_pkg::*;
#(
  parameter int unsigned N_IN       = 36,
  parameter int unsigned N_NODES    = TM_N_NODES,
  parameter int unsigned CLK_PER_BX = TM_CLK_BX,
  parameter int unsigned TOWER_W    = TM_TOWER_W,
  localparam int unsigned RING_W    = N_IN * 2 * 2 * TOWER_W,  // bits per bx
  localparam int unsigned N_DATA    = (RING_W + WORD_W - 1) / WORD_W,
  localparam int unsigned FRAME     = N_NODES * CLK_PER_BX,     // clocks per frame
  localparam int unsigned PW        = $clog2(FRAME),
  localparam int unsigned NW        = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           bx_start,
  input  logic [BX_W-1:0]                bx,
  input  logic [N_IN-1:0][7:0]           in_byte,
  output logic [N_NODES-1:0][WORD_W-1:0] out_word,
  output logic [N_NODES-1:0]             out_hdr,
  output logic [N_NODES-1:0]             out_valid
);
  localparam int unsigned LINK_BITS = 2 * 2 * TOWER_W;   // bits per link per bx
  localparam int unsigned NBYTE     = LINK_BITS / 8;

  // a frame must fit its link
  if (N_DATA + 1 > FRAME) begin : g_frame_check
    $error("pp_tmux: frame of %0d words does not fit %0d clocks", N_DATA + 1, FRAME);
  end
  if (NBYTE != CLK_PER_BX) begin : g_byte_check
    $error("pp_tmux: link bytes per bx must equal clocks per bx");
  end

  logic [3:0]                            sub;
  logic [NW-1:0]                         node;
  logic [N_IN-1:0][LINK_BITS-8-1:0]      gather;   // bytes 0..NBYTE-2
  logic [BX_W-1:0]                       bx_q;
  logic [N_NODES-1:0][N_DATA*WORD_W-1:0] frame_buf;
  logic [N_NODES-1:0][BX_W-1:0]          frame_bx;
  logic [N_NODES-1:0][PW-1:0]            pos;
  logic [N_NODES-1:0]                    active;

  logic [N_IN-1:0][LINK_BITS-1:0]        ring;
  logic                                  ring_done;
  logic [3:0]                            sub_now;

  always_comb begin
    sub_now   = bx_start ? 4'd0 : sub;
    ring_done = (sub_now == 4'(CLK_PER_BX - 1));
    for (int i = 0; i < N_IN; i++) ring[i] = {in_byte[i], gather[i]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sub    <= '0;
      node   <= '0;
      active <= '0;
      pos    <= '0;
      bx_q   <= '0;
    end else begin
      sub <= ring_done ? 4'd0 : sub_now + 1'b1;
      if (sub_now == 0) bx_q <= bx;
      if (ring_done) node <= (node == NW'(N_NODES - 1)) ? '0 : node + 1'b1;
      for (int k = 0; k < N_NODES; k++) begin
        if (ring_done && node == NW'(k)) begin
          active[k] <= 1'b1;
          pos[k]    <= '0;
        end else if (active[k]) begin
          if (pos[k] == PW'(FRAME - 1)) active[k] <= 1'b0;
          pos[k] <= pos[k] + 1'b1;
        end
      end
    end
  end

  // gather bytes; copy the finished ring into the node's buffer
  always_ff @(posedge clk) begin
    for (int i = 0; i < N_IN; i++)
      for (int s = 0; s < NBYTE - 1; s++)
        if (sub_now == 4'(s)) gather[i][8*s +: 8] <= in_byte[i];
    for (int k = 0; k < N_NODES; k++)
      if (ring_done && node == NW'(k)) begin
        frame_buf[k] <= (N_DATA*WORD_W)'(ring);
        frame_bx[k]  <= (sub_now == 0) ? bx : bx_q;
      end
  end

  // output links
  always_comb begin
    for (int k = 0; k < N_NODES; k++) begin
      out_hdr[k]   = active[k] && (pos[k] == '0);
      out_valid[k] = active[k] && (int'(pos[k]) <= N_DATA);
      if (out_hdr[k])
        out_word[k] = {TM_HDR_MARK, 4'(k), 8'h00, frame_bx[k]};
      else if (out_valid[k])
        out_word[k] = frame_buf[k][(int'(pos[k]) - 1) * WORD_W +: WORD_W];
      else
        out_word[k] = '0;
    end
  end
endmodule
