// pattern_ram - pattern injection and capture RAM of one link.
//
// A dual-port memory of DEPTH words. The datapath port either plays the
// stored words out, one per clock (mode RAM_PLAY), or records the incoming
// link words (mode RAM_CAPTURE). A `start` pulse puts the address back to 0.
// Playback loops over addresses 0..play_last (so a pattern of any length,
// e.g. a whole number of 72-row events, repeats cleanly); capture fills the
// whole memory once and then stops, raising `full`. The control port lets software load a pattern or
// read a capture at any time (registered read, one clock later); if both
// ports write the same word on one clock the control port wins.
//
// Injecting patterns and capturing incoming data with one RAM follows the
// document; the depth (one 36 kbit block RAM of 1024 x 32) and the
// loop/stop behaviour are this design's choices.
//
// Timing: dout is registered, so the word at address a appears the clock
// after the address counter held a; `dout_valid` marks played words.
module pattern_ram
  import l1_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = WORD_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  ram_mode_e     mode,
  input  logic          start,
  input  logic [AW-1:0] play_last,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout,
  output logic          dout_valid,
  output logic          full,
  // control port
  input  logic          ctl_we,
  input  logic [AW-1:0] ctl_addr,
  input  logic [W-1:0]  ctl_wdata,
  output logic [W-1:0]  ctl_rdata
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] addr;
  logic          cap_we;

  assign cap_we = (mode == RAM_CAPTURE) && !full && !start;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr       <= '0;
      full       <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= (mode == RAM_PLAY) && !start;
      if (start) begin
        addr <= '0;
        full <= 1'b0;
      end else if (mode == RAM_PLAY) begin
        addr <= (addr == play_last) ? '0 : addr + 1'b1;
      end else if (cap_we) begin
        addr <= addr + 1'b1;
        if (addr == AW'(DEPTH - 1)) full <= 1'b1;
      end
    end
  end

  // memory: one write per clock, control port first
  always_ff @(posedge clk) begin
    if (ctl_we)      mem[ctl_addr] <= ctl_wdata;
    else if (cap_we) mem[addr]     <= din;
  end

  always_ff @(posedge clk) begin
    dout      <= mem[addr];
    ctl_rdata <= mem[ctl_addr];
  end
endmodule
