// mul_neg_j: twiddle multiplier of the 4-point (tenth) stage.
//
// In a 4-point radix-2 block the only twiddles are W4^0 = 1 and W4^1 = -j.
// Multiplying by -j needs no arithmetic: (re + j*im) * -j = im - j*re, so
// real and imaginary parts are swapped and one sign bit is inverted, a
// multiplexer and a sign reverse as in the source design.
//
// Purely combinational. sel = 1 multiplies by -j, sel = 0 passes by 1.
module mul_neg_j
  import fft_pkg::*;
(
  input  logic  sel,
  input  cplx_t din,
  output cplx_t dout
);

  always_comb begin
    if (sel) begin
      dout.re = din.im;
      dout.im = {~din.re[31], din.re[30:0]};
    end else begin
      dout = din;
    end
  end

endmodule
