// acordic_tb: adaptive CORDIC complex multiplier.
//  * the 15-degree example must take exactly five rotations;
//  * all 1024 twiddle angles of a 2048-point FFT, -2*pi*a/2048, a = 0..1023,
//    with random operands, then random operands and random full-circle angles;
//  * each result is compared with (x + j*y) * exp(j*z) in double precision
//    (tolerance: residual angle bound c15 plus float rounding);
//  * the rotation count and the latency (accept edge to out_valid) are
//    compared with a double-precision model of the angle selection:
//    max(n, 1) + 1 clocks for n rotations.
// The average clocks per twiddle and the error statistics are printed.
module acordic_tb;
  import tb_fp_pkg::*;

  localparam int  L = 16;
  localparam real BAM2RAD = 2.0 * PI / 4294967296.0;

  logic        clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [31:0] ix = 0, iy = 0, iz = 0, ox, oy;
  logic [4:0]  iters;
  logic        busy;
  int checks = 0, failures = 0;

  acordic #(.NUM_ANGLES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real th [L+1];
  real c  [L];

  // selection model: number of rotations and whether theta[L-1] was used
  task automatic model(input real zrad, output int n, output bit used_last);
    real zd;
    int  i;
    zd = zrad * 180.0 / PI;
    // fold to [-45, 45)
    while (zd >= 45.0)  zd -= 90.0;
    while (zd < -45.0)  zd += 90.0;
    n = 0; used_last = 0;
    forever begin
      real a;
      a = rabs(zd);
      if (a <= c[L-1]) break;
      i = L - 1;
      for (int k = L - 1; k >= 0; k--) if (a > c[k]) i = k;
      zd = (zd < 0.0) ? zd + th[i] : zd - th[i];
      n++;
      if (i == L - 1) begin
        used_last = 1;
        break;
      end
    end
  endtask

  real sum_sq = 0.0, max_rel = 0.0;
  longint total_lat = 0;

  task automatic run_one(input logic [31:0] x, input logic [31:0] y, input logic [31:0] z,
                         input bit stats);
    real xr, yr, zr, er, ei, mag, err, t0;
    int  n, lat;
    bit  ul;
    @(negedge clk);
    ix = x; iy = y; iz = z; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    lat = 0;
    #1 in_valid = 0;
    do begin
      @(posedge clk);
      #1 lat++;
    end while (!out_valid);
    xr = f2r(x); yr = f2r(y); zr = real'($signed(z)) * BAM2RAD;
    er = xr * $cos(zr) - yr * $sin(zr);
    ei = xr * $sin(zr) + yr * $cos(zr);
    mag = $sqrt(xr * xr + yr * yr);
    err = $sqrt((f2r(ox) - er) ** 2 + (f2r(oy) - ei) ** 2);
    model(zr, n, ul);
    checks++;
    if (err > 2.5e-5 * mag) begin
      failures++;
      $display("z=%h x=%g y=%g: got (%g, %g) expected (%g, %g)", z, xr, yr,
               f2r(ox), f2r(oy), er, ei);
    end
    checks++;
    if (int'(iters) != n || lat != ((n > 0) ? n : 1) + 1) begin
      failures++;
      $display("z=%h: iters=%0d latency=%0d, model %0d rotations (last used %0d)",
               z, iters, lat, n, ul);
    end
    if (stats) begin
      total_lat += longint'(lat);
      sum_sq    += ((f2r(ox) - er) ** 2 + (f2r(oy) - ei) ** 2) / 2.0;
      if (err / mag > max_rel) max_rel = err / mag;
    end
  endtask

  initial begin
    for (int i = 0; i <= L; i++) th[i] = $atan(1.0 / real'(64'd1 << i)) * 180.0 / PI;
    for (int i = 0; i < L - 1; i++) c[i] = (th[i] + th[i+1]) / 2.0;
    c[L-1] = th[L-1] / 2.0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // worked example: rotate 1 + 0j by 15 degrees
    run_one(32'h3F800000, 32'h0, 32'(longint'(15.0 / 360.0 * 4294967296.0)), 0);
    checks++;
    if (iters != 5) begin
      failures++;
      $display("15-degree example used %0d rotations, expected 5", iters);
    end

    // the 1024 twiddle angles of a 2048-point FFT
    for (int a = 0; a < 1024; a++)
      run_one(rand_f(-2, 2), rand_f(-2, 2), ~(32'(a) << 21) + 32'd1, 1);
    $display("1024 twiddles: %0d clocks (%.2f per operation), MSE %.3e, max error ratio %.3f ppm",
             total_lat, real'(total_lat) / 1024.0, sum_sq / 1024.0, max_rel * 1.0e6);

    // random operands and angles
    for (int n = 0; n < 1000; n++)
      run_one(rand_f(-8, 8), rand_f(-8, 8), $urandom, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
