// fp_pkg: IEEE-754 single-precision helpers shared by the butterfly and the
// CORDIC datapath.
//
// fp_add adds two single-precision words in one combinational step: operands
// are swapped so the larger magnitude comes first, the smaller is aligned
// with guard, round and sticky bits, the mantissas are added or subtracted,
// the result is renormalised with a leading-zero count and rounded to
// nearest-even. Subnormal inputs read as zero and subnormal results are
// flushed to zero; an exponent overflow gives infinity. NaN is not handled.
// These corner-case rules are this design's choice: the source design only
// says its datapath is IEEE-754 single precision.
//
// fp_scale2 multiplies by 2^-i by lowering the exponent, which is how the
// CORDIC "shift" is done on floating-point data.
package fp_pkg;

  typedef logic [31:0] float_t;

  function automatic float_t fp_neg(input float_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic float_t fp_scale2(input float_t a, input logic [4:0] i);
    if (a[30:23] <= {3'b000, i}) return 32'h0;
    return {a[31], a[30:23] - {3'b000, i}, a[22:0]};
  endfunction

  function automatic float_t fp_add(input float_t a, input float_t b);
    logic        sa, sb, sr;
    logic [7:0]  ea, eb, d;
    logic [23:0] ma, mb;
    logic [26:0] xa, xb, xs;           // mantissa, guard, round, sticky
    logic [27:0] sum;
    logic [26:0] nrm;
    logic [9:0]  er;                   // signed-ish working exponent
    logic        sticky;
    logic [4:0]  lz;
    logic [24:0] rnd;
    logic        up;
    // zero / subnormal operands read as zero
    if (a[30:23] == 8'd0) a = 32'h0;
    if (b[30:23] == 8'd0) b = 32'h0;
    // larger magnitude first
    if (b[30:0] > a[30:0]) begin
      float_t t;
      t = a; a = b; b = t;
    end
    sa = a[31]; sb = b[31];
    ea = a[30:23]; eb = b[30:23];
    if (ea == 8'd0) return 32'h0;      // both zero
    if (eb == 8'd0) return a;
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    d  = ea - eb;
    xa = {ma, 3'b000};
    xb = {mb, 3'b000};
    if (d >= 8'd27) begin
      xs = 27'd1;                      // only the sticky bit survives
    end else begin
      xs     = xb >> d;
      sticky = 1'b0;
      for (int k = 0; k < 27; k++)
        if (k < int'(d) && xb[k]) sticky = 1'b1;
      xs[0] = xs[0] | sticky;
    end
    sr = sa;
    er = {2'b00, ea};
    if (sa == sb) begin
      sum = {1'b0, xa} + {1'b0, xs};
      if (sum[27]) begin
        nrm = sum[27:1];
        nrm[0] = nrm[0] | sum[0];
        er = er + 10'd1;
      end else begin
        nrm = sum[26:0];
      end
    end else begin
      sum = {1'b0, xa} - {1'b0, xs};
      if (sum[26:0] == 27'd0) return 32'h0;
      lz = 5'd0;
      for (int k = 26; k >= 0; k--) begin
        if (sum[k]) break;
        lz = lz + 5'd1;
      end
      nrm = sum[26:0] << lz;
      er  = er - {5'd0, lz};
    end
    // round to nearest even on guard / round / sticky
    up  = nrm[2] & (nrm[1] | nrm[0] | nrm[3]);
    rnd = {1'b0, nrm[26:3]} + {24'd0, up};
    if (rnd[24]) begin
      rnd = rnd >> 1;
      er  = er + 10'd1;
    end
    if (er[9] || er == 10'd0) return 32'h0;             // underflow
    if (er >= 10'd255) return {sr, 8'hFF, 23'd0};        // overflow
    return {sr, er[7:0], rnd[22:0]};
  endfunction

  function automatic float_t fp_sub(input float_t a, input float_t b);
    return fp_add(a, fp_neg(b));
  endfunction

endpackage
