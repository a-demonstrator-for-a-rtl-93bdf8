// l1_pkg - constants shared by the calorimeter trigger demonstrator and the
// time-multiplexed trigger.
//
// Geometry follows the CMS calorimeter trigger: 72 towers in phi, one link
// word of 32 bits per fabric clock. The laboratory demonstrator runs its
// fabric at 120 MHz (three clocks per 40 MHz bunch crossing) with 8-bit
// towers; the time-multiplexed system runs at 240 MHz (six clocks per bunch
// crossing) with 12-bit towers and 10 Main-Processor nodes served in turn.
// The orbit length of 3564 bunch crossings is the LHC value and is this
// design's addition.
package l1_pkg;
  localparam int unsigned N_PHI        = 72;   // towers around phi
  localparam int unsigned WORD_W       = 32;   // fabric word of every link
  localparam int unsigned ORBIT_BX     = 3564; // bunch crossings per orbit
  localparam int unsigned BX_W         = 12;   // bits of a bx number
  localparam int unsigned PHI_W        = 7;    // bits of a phi index
  localparam int unsigned TM_N_NODES   = 10;   // MP nodes in round robin
  localparam int unsigned DEMO_CLK_BX  = 3;    // 120 MHz / 40 MHz
  localparam int unsigned TM_CLK_BX    = 6;    // 240 MHz / 40 MHz
  localparam int unsigned DEMO_TOWER_W = 8;    // bits per tower, laboratory
  localparam int unsigned TM_TOWER_W   = 12;   // bits per tower, worst case
  // header word of a time-multiplexed frame: marker byte then bx number
  localparam logic [7:0] TM_HDR_MARK   = 8'hBC;

  // source of the algorithm input / transmit data in the demonstrator
  typedef enum logic [1:0] {
    SRC_LINK    = 2'd0,   // aligned receiver data
    SRC_PATTERN = 2'd1,   // pattern from the bunch-crossing counter
    SRC_RAM     = 2'd2    // pattern injection RAM
  } src_sel_e;

  // pattern injection / capture RAM modes
  typedef enum logic [1:0] {
    RAM_IDLE    = 2'd0,
    RAM_PLAY    = 2'd1,
    RAM_CAPTURE = 2'd2
  } ram_mode_e;
endpackage
