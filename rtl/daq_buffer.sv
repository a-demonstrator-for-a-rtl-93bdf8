// daq_buffer - DAQ event buffer: holds the arrays copied by a capture unit
// until they are read out.
//
// A first-word-fall-through FIFO of DEPTH entries, each an array of W bits
// with a `last` flag that marks the end of an event. rd_data/rd_last show the
// oldest entry whenever `empty` is low; rd_en removes it. `events` counts
// the complete events held. A write into a full buffer is dropped and sets
// the sticky `overflow` flag, cleared only by reset.
//
// The document names the DAQ buffer; its organisation, depth and overflow
// rule are this design's choices.
module daq_buffer #(
  parameter int unsigned W     = 384,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         wr_last,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_last,
  output logic         empty,
  output logic         full,
  output logic         overflow,
  output logic [AW:0]  events
);
  logic [W:0]  mem [DEPTH];
  logic [AW:0] wp, rp;
  logic        do_wr, do_rd;

  always_comb begin
    empty   = (wp == rp);
    full    = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
    do_wr   = wr_en && !full;
    do_rd   = rd_en && !empty;
    {rd_last, rd_data} = mem[rp[AW-1:0]];
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wp[AW-1:0]] <= {wr_last, wr_data};

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      overflow <= 1'b0;
      events   <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      if (wr_en && full) overflow <= 1'b1;
      events <= events + (AW+1)'(do_wr && wr_last) - (AW+1)'(do_rd && rd_last);
    end
  end

  assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty)
    else $warning("daq_buffer: read while empty");
endmodule
