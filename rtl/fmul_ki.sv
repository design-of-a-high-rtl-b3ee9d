// fmul_ki: length-factor multiplier (FMul_ki) of the adaptive CORDIC.
//
// Every micro-rotation by atan(2^-i) stretches the vector by 1/cos(atan(2^-i)).
// Since the adaptive CORDIC skips angles, the total correction is not a
// constant, so this unit accumulates K = product of k_i = cos(atan(2^-i)) over
// the rotations actually made. As in the source design K is a bare 24-bit
// mantissa with no sign or exponent, because 0.6 < K <= 1; the binary point
// after the top bit (1 integer, 23 fraction bits, so that K = 1 is exact) and
// round-to-nearest of the 48-bit product are this design's choices.
//
// Timing: load sets K = 1 at the next clock edge; step multiplies by K_I[idx]
// at the next edge. It runs in the same clock as the FALU_XY step.
module fmul_ki
  import fft_pkg::*;
(
  input  logic        clk,
  input  logic        load,
  input  logic        step,
  input  logic [3:0]  idx,
  output logic [23:0] ok
);

  logic [47:0] prod;
  logic [24:0] rounded;

  always_comb begin
    prod    = ok * K_I[idx];
    rounded = {1'b0, prod[46:23]} + {24'd0, prod[22]};
  end

  always_ff @(posedge clk) begin
    if (load)      ok <= K_ONE;
    else if (step) ok <= rounded[23:0];
  end

endmodule
