// tom_pkg: sizes and types shared by the Tensor-Organized Memory (TOM) blocks.
//
// A TOM stores "messages": each message is one pattern per winner-take-all (WTA)
// module, and a pattern is a binary vector of PAT_LEN pixels. Every WTA module has
// NUM_CLASS output neurons, one per trained pattern (class). A stored message is
// therefore a list of NUM_WTA class indices, one per WTA module.
//
// Sizes that follow the document: 25 input neurons per WTA (PAT_LEN), 25 trained
// letters (NUM_CLASS) and messages of four letters (NUM_WTA). The number of message
// slots (MAX_MSG), the shift-register length and the floating-point format are this
// design's own choices.
package tom_pkg;

  // Default geometry of the memory.
  localparam int unsigned PAT_LEN   = 25;  // input-layer neurons per WTA module
  localparam int unsigned NUM_CLASS = 25;  // output (class) neurons per WTA module
  localparam int unsigned NUM_WTA   = 4;   // WTA modules = patterns per message
  localparam int unsigned MAX_MSG   = 8;   // stored-message slots (own choice)

  // Level-I shift-register neuron: number of shift-register bits.
  localparam int unsigned SR_BITS   = 6;

  // Level-II output neuron floating-point format (IEEE-754 single-precision fields).
  localparam int unsigned EXP_W     = 8;
  localparam int unsigned MAN_W     = 23;
  localparam int unsigned FP_W      = 1 + EXP_W + MAN_W;

  // Default number of clock cycles the spiking TOM integrates one message.
  localparam int unsigned WINDOW    = 64;

  // Selects which register bank a weight-register write goes to.
  typedef enum logic [1:0] {
    WSEL_W2  = 2'd0,  // class weight row: one trained pattern of one WTA class
    WSEL_W1  = 2'd1,  // input-layer weight (pixel enable) row of one WTA module
    WSEL_MSG = 2'd2   // stored message: one class index per WTA module + valid
  } wsel_e;

endpackage
