// tb_fp_pkg: testbench helpers to move between IEEE-754 single words and
// SystemVerilog reals, worked out through the double-precision encoding so
// that the checks do not reuse any of the design's arithmetic.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // round-to-nearest-even conversion of a real to single precision
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [52:0] m;
    logic [24:0] q;
    logic        g, st;
    if (r == 0.0) return 32'h0;
    d  = $realtobits(r);
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:0]};
    q  = {1'b0, m[52:29]};
    g  = m[28];
    st = |m[27:0];
    if (g && (st || q[0])) q = q + 25'd1;
    if (q[24]) begin
      q = q >> 1;
      e = e + 1;
    end
    if (e <= 0) return 32'h0;
    return {d[63], 8'(e), q[22:0]};
  endfunction

  function automatic real rabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  // random single-precision value with magnitude in [2^lo, 2^hi)
  function automatic logic [31:0] rand_f(input int lo, input int hi);
    int e;
    e = lo + int'($urandom_range(hi - lo - 1, 0));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

  localparam real PI = 3.14159265358979323846;

endpackage
