// rsse_pkg - constants and helpers shared by the recursive soft sequential
// estimation (RSSE) acquisition blocks.
//
// The m-sequence is the one used throughout the evaluation of the method:
// g(D) = 1 + D + D^3 + D^4 + D^13, an S = 13 stage generator with period
// 8191. TAPS is a mask with bit (k-1) set when g_k = 1, so the recursion
// in the +/-1 domain is c_i = c_{i-1} c_{i-3} c_{i-4} c_{i-13}.
//
// Chips are carried as single bits: logic 0 stands for the chip +1 and
// logic 1 for the chip -1, so a product of chips becomes an XOR of bits.
//
// Soft values are two's complement fixed point. The widths below are this
// design's own choice (the method itself is stated in real numbers):
//   received sample Z   : Z_W bits,  Z_FRAC fractional bits  (1.0 = 32)
//   channel reliability : LC_W bits unsigned, LC_FRAC fractional bits
//   LLR                 : LLR_W bits, LLR_FRAC fractional bits (1.0 = 8),
//                         saturated symmetrically to +/-LLR_MAX.
package rsse_pkg;

  localparam int unsigned S        = 13;
  localparam logic [S-1:0] TAPS    = 13'h100D;   // g1, g3, g4, g13

  localparam int unsigned Z_W      = 8;
  localparam int unsigned Z_FRAC   = 5;
  localparam int unsigned LC_W     = 8;
  localparam int unsigned LC_FRAC  = 4;
  localparam int unsigned LLR_W    = 12;
  localparam int unsigned LLR_FRAC = 3;

  // Chips integrated per despreading dwell of the code tracking loop.
  localparam int unsigned DWELL    = 128;

  // Acquisition controller states.
  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,   // waiting for start
    ST_ACQ    = 2'd1,   // recursing, waiting for the loading condition
    ST_VERIFY = 2'd2,   // generator loaded, tracking loop checking the phase
    ST_LOCK   = 2'd3    // code phase held
  } acq_state_e;

endpackage
