// bx_pattern_gen - bunch-crossing counter and the test pattern derived from it.
//
// The counter runs at the fabric clock: `sub` counts the CLK_PER_BX clocks of
// one bunch crossing and `bx` counts bunch crossings round the orbit
// (ORBIT_BX). A bc0 pulse (orbit-start signal) restarts both: the clock after
// bc0 is sub 0 of bx 0. A frame counter marks every FRAME_CLK clocks
// (`frame_start`), the length of one time-multiplexed phi loop; it restarts
// on bc0 as well.
//
// The pattern word of link i is {i[7:0], sub[3:0], frame clock[7:0],
// bx[11:0]}, so that a receiver can tell link, bunch crossing and position in
// the frame from any word. Using the counter as the pattern source follows
// the document; the word layout, the orbit length and the frame marker are
// this design's choices.
//
// Timing: all outputs are registered; pattern follows the counter values on
// the same clock.
module bx_pattern_gen
  import l1_pkg::*;
#(
  parameter int unsigned N_LINKS    = 12,
  parameter int unsigned CLK_PER_BX = DEMO_CLK_BX,
  parameter int unsigned ORBIT      = ORBIT_BX,
  parameter int unsigned FRAME_CLK  = N_PHI
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           bc0,
  output logic [BX_W-1:0]                bx,
  output logic [3:0]                     sub,
  output logic                           frame_start,
  output logic [N_LINKS-1:0][WORD_W-1:0] pattern
);
  logic [7:0] fclk;

  always_ff @(posedge clk) begin
    if (rst || bc0) begin
      bx   <= '0;
      sub  <= '0;
      fclk <= '0;
    end else begin
      if (sub == 4'(CLK_PER_BX - 1)) begin
        sub <= '0;
        bx  <= (bx == BX_W'(ORBIT - 1)) ? '0 : bx + 1'b1;
      end else begin
        sub <= sub + 1'b1;
      end
      fclk <= (fclk == 8'(FRAME_CLK - 1)) ? '0 : fclk + 1'b1;
    end
  end

  always_comb begin
    frame_start = (fclk == '0);
    for (int i = 0; i < N_LINKS; i++)
      pattern[i] = {8'(i), sub, fclk, bx};
  end
endmodule
