// fft_pkg: types and constants of the floating-point FFT and its adaptive
// CORDIC twiddle multiplier.
//
// Angles are 32-bit two's-complement binary angles: 2^32 stands for 360
// degrees, so 2^30 is 90 degrees. THETA[i] = atan(2^-i) and the selection
// thresholds C[i] = (THETA[i] + THETA[i+1]) / 2, with C[15] = THETA[15] / 2,
// are the 16-entry angle table of the design, converted to binary angles and
// rounded. K_I[i] = cos(atan(2^-i)) is the per-rotation length factor,
// unsigned with 1 integer and 23 fraction bits.
package fft_pkg;

  typedef logic [31:0] angle_t;

  typedef struct packed {
    logic [31:0] re;
    logic [31:0] im;
  } cplx_t;

  localparam int MAX_ANGLES = 16;

  localparam logic [31:0] THETA [MAX_ANGLES] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861
  };

  localparam logic [31:0] C_THR [MAX_ANGLES] = '{
    32'd426902159, 32'd242196156, 32'd126231832, 32'd63836044,
    32'd32010898,  32'd16017152,  32'd8010042,   32'd4005204,
    32'd2002625,   32'd1001315,   32'd500658,    32'd250329,
    32'd125165,    32'd62582,     32'd31291,     32'd10430
  };

  localparam logic [23:0] K_I [MAX_ANGLES] = '{
    24'd5931642, 24'd7502999, 24'd8138145, 24'd8323830,
    24'd8372272, 24'd8384515, 24'd8387584, 24'd8388352,
    24'd8388544, 24'd8388592, 24'd8388604, 24'd8388607,
    24'd8388608, 24'd8388608, 24'd8388608, 24'd8388608
  };

  localparam logic [23:0] K_ONE = 24'd8388608;   // 1.0

  // Kind of twiddle multiplier a stage carries.
  typedef enum logic [1:0] {
    MUL_ACOR = 2'd0,   // general twiddle: adaptive CORDIC
    MUL_NEGJ = 2'd1,   // 4-point stage: twiddles 1 and -j only
    MUL_NONE = 2'd2    // 2-point stage: twiddle always 1
  } mul_kind_e;

endpackage
