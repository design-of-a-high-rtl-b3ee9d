// fp_butterfly: radix-2 floating-point butterfly.
//
// sum = a + b and diff = a - b on complex single-precision values, four
// IEEE-754 additions in one combinational step (fp_pkg::fp_add). In each FFT
// stage a is the older sample, read from Shift_reg1, and b the newer one
// arriving at the stage input; the sum goes on to the next stage and the
// difference to the twiddle multiplier, as in the source design.
module fp_butterfly
  import fp_pkg::*;
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t sum,
  output cplx_t diff
);

  always_comb begin
    sum.re  = fp_add(a.re, b.re);
    sum.im  = fp_add(a.im, b.im);
    diff.re = fp_sub(a.re, b.re);
    diff.im = fp_sub(a.im, b.im);
  end

endmodule
