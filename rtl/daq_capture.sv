// daq_capture - DAQ capture unit: a pipeline over an array of link words that
// hands a window of it to the DAQ buffer when a Level-1 accept arrives.
//
// Every clock the array of N_WORDS 32-bit words enters a circular RAM of
// LATENCY entries, so the word read back is the one that entered LATENCY
// clocks before (the pipeline can be made any length by the parameter). When
// l1a is high, the unit copies WINDOW consecutive arrays, starting with the
// one that entered LATENCY clocks before the l1a clock, to the buffer; the
// last copy carries wr_last. An l1a that arrives while a window is still
// being copied is not taken and is counted in `l1a_lost`.
//
// A capture pipeline of arbitrary length that is copied to a DAQ buffer on a
// Level-1 trigger follows the document; the RAM structure, LATENCY, WINDOW
// and the busy rule are this design's choices.
//
// Timing: for an l1a on clock T, wr_en is high on clocks T+1 .. T+WINDOW and
// wr_data on clock T+1+k is the array that was on din at clock T-LATENCY+k.
module daq_capture
  import l1_pkg::*;
#(
  parameter int unsigned N_WORDS = 12,
  parameter int unsigned W       = WORD_W,
  parameter int unsigned LATENCY = 64,
  parameter int unsigned WINDOW  = 3,
  localparam int unsigned AW     = (LATENCY > 1) ? $clog2(LATENCY) : 1,
  localparam int unsigned CW     = $clog2(WINDOW + 1)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [N_WORDS-1:0][W-1:0] din,
  input  logic                      l1a,
  output logic                      wr_en,
  output logic [N_WORDS-1:0][W-1:0] wr_data,
  output logic                      wr_last,
  output logic [15:0]               l1a_lost
);
  logic [N_WORDS*W-1:0] pipe [LATENCY];
  logic [AW-1:0]        wp;
  logic [N_WORDS*W-1:0] rd_q;
  logic [CW-1:0]        left;    // arrays still to copy

  always_ff @(posedge clk) begin
    rd_q     <= pipe[wp];
    pipe[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      left     <= '0;
      l1a_lost <= '0;
    end else begin
      wp <= (wp == AW'(LATENCY - 1)) ? '0 : wp + 1'b1;
      if (left != '0) begin
        left <= left - 1'b1;
        if (l1a) l1a_lost <= l1a_lost + 1'b1;
      end else if (l1a) begin
        left <= CW'(WINDOW);
      end
    end
  end

  always_comb begin
    wr_en   = (left != '0);
    wr_last = (left == CW'(1));
    wr_data = rd_q;
  end
endmodule
