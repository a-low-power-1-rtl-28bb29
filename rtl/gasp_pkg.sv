// gasp_pkg: types and constants shared by the GasP-style FIFO blocks.
//
// A GasP state conductor holds one bit that says whether the place it guards
// holds a data item. The encoding follows GasP practice: a HI conductor means
// EMPTY and a LO conductor means FULL. The enum below keeps that polarity so
// that the stored bit is the level the real wire would carry.
//
// The default sizes are those of the larger FIFO that was built and measured:
// eighteen stages of one-bit data. A ten-stage version was measured as well
// and is obtained by overriding N_STAGES.
package gasp_pkg;

  typedef enum logic {
    GASP_FULL  = 1'b0,  // LO: a data item sits in the latch
    GASP_EMPTY = 1'b1   // HI: the latch holds nothing
  } gasp_state_e;

  localparam int unsigned DEFAULT_N_STAGES = 18;
  localparam int unsigned DEFAULT_WIDTH    = 1;

endpackage
