// fmulk_norm: K multiplier and output normaliser (FMulK_Norm) of the adaptive
// CORDIC.
//
// Multiplies the unscaled CORDIC results x and y by the accumulated length
// factor K and returns IEEE-754 single words. K has 1 integer and 23 fraction
// bits and lies in (0.6, 1], so each 24x24-bit mantissa product is in
// [0.6, 2) and needs at most a one-place normalising shift; the result is
// rounded to nearest even. Zero in gives zero out; an exponent that falls to
// zero flushes to zero. The function is the source design's, the rounding
// and flush rules are this design's choice.
//
// Purely combinational; the CORDIC controller registers the outputs.
module fmulk_norm
  import fp_pkg::*;
(
  input  float_t      x,
  input  float_t      y,
  input  logic [23:0] k,
  output float_t      ox,
  output float_t      oy
);

  function automatic float_t mul_k(input float_t a, input logic [23:0] kk);
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st, up;
    logic [24:0] r;
    logic [8:0]  e;
    if (a[30:23] == 8'd0 || kk == 24'd0) return 32'h0;
    p = {1'b1, a[22:0]} * kk;          // value p * 2^-46
    e = {1'b0, a[30:23]};
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 9'd1;
    end else if (p[46]) begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end else begin
      m  = p[45:22];
      g  = p[21];
      st = |p[20:0];
      e  = e - 9'd1;
    end
    up = g & (st | m[0]);
    r  = {1'b0, m} + {24'd0, up};
    if (r[24]) begin
      r = r >> 1;
      e = e + 9'd1;
    end
    if (e == 9'd0 || e[8]) return 32'h0;
    if (e >= 9'd255) return {a[31], 8'hFF, 23'd0};
    return {a[31], e[7:0], r[22:0]};
  endfunction

  always_comb begin
    ox = mul_k(x, k);
    oy = mul_k(y, k);
  end

endmodule
