// aries_pkg: widths and types shared by the Aries convolution block.
//
// The Aries block computes a 5-tap weighted sum of 8-bit unsigned samples by
// splitting the samples into bit planes and looking up the conditional sum of
// the coefficients for every 5-bit bit-plane pattern in a 32-word RAM.  The
// widths below are the ones the block uses: 10-bit RAM words, a 13-bit
// systolic adder result, a 17-bit accumulator sum that is cut to a 16-bit
// block result.  The RAM control state type is this design's own encoding.
package aries_pkg;

  localparam int unsigned TAPS      = 5;    // samples in the window (5x1 kernel)
  localparam int unsigned DATA_W    = 8;    // unsigned input samples
  localparam int unsigned NIB_W     = 4;    // bit planes handled per fast cycle
  localparam int unsigned ADDR_W    = TAPS; // one address bit per tap
  localparam int unsigned RAM_DEPTH = 1 << ADDR_W;
  localparam int unsigned COEF_W    = 10;   // conditional-sum word width
  localparam int unsigned SYS_W     = COEF_W + NIB_W - 1;  // 13
  localparam int unsigned ACC_W     = SYS_W + NIB_W;       // 17
  localparam int unsigned OUT_W     = ACC_W - 1;           // 16

  // RAM control: normal reads, idle before write, write, idle before read.
  typedef enum logic [1:0] {
    RC_READ   = 2'd0,
    RC_IDLE_W = 2'd1,
    RC_WRITE  = 2'd2,
    RC_IDLE_R = 2'd3
  } ram_state_t;

endpackage
