// rot_sel: rotation selection (RotSel) of the adaptive CORDIC.
//
// Given the residual angle z, it picks the one table angle that brings z
// closest to zero: THETA[i] is chosen when C[i] < |z| <= C[i-1] (C[-1] taken
// as infinite), rotating in the direction of sign(z). When |z| is at or below
// the last threshold C[NUM_ANGLES-1] no rotation is needed and the operation
// is finished. This is the selection rule of the source design; the binary
// angle encoding is this design's choice. Because each step leaves at most
// half the chosen angle, the chosen index rises from one step to the next.
//
// Purely combinational. Outputs: rotate (a rotation is needed), neg (rotate
// clockwise, z < 0), idx (index i), last (i is the last table entry) and
// z_next = z - sign(z) * THETA[i].
module rot_sel
  import fft_pkg::*;
#(
  parameter int NUM_ANGLES = 16
) (
  input  angle_t     z,
  output logic       rotate,
  output logic       neg,
  output logic [3:0] idx,
  output logic       last,
  output angle_t     z_next
);

  logic [31:0] mag;

  always_comb begin
    neg    = z[31];
    mag    = neg ? (~z + 32'd1) : z;
    rotate = mag > C_THR[NUM_ANGLES-1];
    idx    = 4'(NUM_ANGLES - 1);
    // smallest i with |z| > C[i]
    for (int i = NUM_ANGLES - 1; i >= 0; i--)
      if (mag > C_THR[i]) idx = 4'(i);
    last   = (idx == 4'(NUM_ANGLES - 1));
    z_next = neg ? (z + THETA[idx]) : (z - THETA[idx]);
  end

endmodule
