// Shared types and constants of the block-based phase estimator.
//
// The estimator captures a block of M 8-bit samples of a sinusoid, measures
// the block (zero crossings and energy), derives amplitude A, frequency F and
// an initial phase, and then refines the phase iteratively with a CORDIC and
// a double-precision floating-point unit. The block length (2400), the 8-bit
// sample width and the use of IEEE 754 binary64 arithmetic follow the
// document; the angle format (a 32-bit fraction of one turn, so that phase
// wraps modulo 2*pi for free) and the fixed-point widths are this design's
// own choices.
package pe_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned SAMPLE_W  = 8;     // ADC sample width
  localparam int unsigned BLOCK_M   = 2400;  // samples per block
  localparam int unsigned IDX_W     = 15;    // sample index / crossing count width
  localparam int unsigned CS_W      = 32;    // cumulative sum of squares width
  localparam int unsigned ANGLE_W   = 32;    // angle = fraction of a turn, 2^32 per turn
  localparam int unsigned AMP_FRAC  = 16;    // amplitude fixed point: Q16.16
  localparam int unsigned TRIG_FRAC = 30;    // CORDIC sin/cos: signed Q2.30

  // ------------------------------------------------------ FPU operations
  typedef enum logic [2:0] {
    FP_ADD = 3'd0,   // a + b
    FP_SUB = 3'd1,   // a - b
    FP_MUL = 3'd2,   // a * b
    FP_DIV = 3'd3,   // a / b
    FP_I2F = 3'd4,   // signed 64-bit integer a -> double
    FP_F2I = 3'd5    // double a -> signed 64-bit integer, truncated toward zero
  } fp_op_e;

  // ------------------------------------------- binary64 constants (bit patterns)
  localparam logic [63:0] DBL_ZERO      = 64'h0000_0000_0000_0000;
  localparam logic [63:0] DBL_2POW_M16  = 64'h3EF0_0000_0000_0000; // 2^-16
  localparam logic [63:0] DBL_2POW_M30  = 64'h3E10_0000_0000_0000; // 2^-30
  localparam logic [63:0] DBL_2POW_M32  = 64'h3DF0_0000_0000_0000; // 2^-32
  // 2^32 / (2*pi): radians -> turn fraction in 2^-32 units
  localparam logic [63:0] DBL_RAD2ANG   = 64'h41C4_5F30_6DC9_C883;
  // 2*pi / 2^32: turn fraction in 2^-32 units -> radians
  localparam logic [63:0] DBL_ANG2RAD   = 64'h3E19_21FB_5444_2D18;

  // ------------------------------------------------------ CORDIC arctangents
  // ATAN(i) = round(atan(2^-i) / (2*pi) * 2^32), angle in 2^-32 turn units.
  localparam int unsigned CORDIC_MAX_IT = 30;
  localparam logic [31:0] ATAN_TABLE [CORDIC_MAX_IT] = '{
    32'h20000000, 32'h12E4051E, 32'h09FB385B, 32'h051111D4, 32'h028B0D43,
    32'h0145D7E1, 32'h00A2F61E, 32'h00517C55, 32'h0028BE53, 32'h00145F2F,
    32'h000A2F98, 32'h000517CC, 32'h00028BE6, 32'h000145F3, 32'h0000A2FA,
    32'h0000517D, 32'h000028BE, 32'h0000145F, 32'h00000A30, 32'h00000518,
    32'h0000028C, 32'h00000146, 32'h000000A3, 32'h00000051, 32'h00000029,
    32'h00000014, 32'h0000000A, 32'h00000005, 32'h00000003, 32'h00000001
  };
  // CORDIC gain compensation: prod(1/sqrt(1+2^-2i)) * 2^30
  localparam logic signed [31:0] CORDIC_K = 32'sh26DD3B6A;

endpackage
