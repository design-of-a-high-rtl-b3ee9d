// acor_tables_tb: the adaptive CORDIC workload with the three angle tables
// of 16, 8 and 4 entries (ACor_16, ACor_8, ACor_4). Each instance gets the
// 1024 twiddle angles -pi*a/1024, a = 0..1023, back to back on random
// operands. For each table it checks:
//  * every result against (x + j*y) * exp(j*z) in double precision, within
//    the error the table's stop threshold allows (sin of the last threshold
//    angle) plus float rounding;
//  * the clocks from the first accept to the last result, which must be
//    within 10% of the latency reported for the same 1024-angle run (6621,
//    3497 and 2145 clocks).
// The mean square error and the largest error ratio are printed.
module acor_tables_tb;
  import tb_fp_pkg::*;

  localparam real BAM2RAD = 2.0 * PI / 4294967296.0;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  logic fin [3];

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : g_tab
    localparam int  L        = (g == 0) ? 16 : ((g == 1) ? 8 : 4);
    localparam int  PAPER_LAT = (g == 0) ? 6621 : ((g == 1) ? 3497 : 2145);

    logic        in_valid, in_ready, out_valid, busy;
    logic [31:0] ix, iy, iz, ox, oy;
    logic [4:0]  iters;

    acordic #(.NUM_ANGLES(L)) dut (.*);

    logic [31:0] xs [1024], ys [1024];
    longint      cyc = 0, t0 = 0;

    always @(posedge clk) cyc <= cyc + 1;

    initial begin
      in_valid = 0; ix = 0; iy = 0; iz = 0;
      for (int a = 0; a < 1024; a++) begin
        xs[a] = rand_f(-2, 2); ys[a] = rand_f(-2, 2);
      end
      @(posedge rst_n);
      for (int a = 0; a < 1024; a++) begin
        @(negedge clk);
        in_valid = 1; ix = xs[a]; iy = ys[a]; iz = ~(32'(a) << 21) + 32'd1;
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        if (a == 0) t0 = cyc;
        @(posedge clk);
        #1 in_valid = 0;
      end
    end

    initial begin
      real xr, yr, zr, er, ei, mag, err, bound, mse, maxr, thr;
      longint clocks;
      fin[g] = 0; mse = 0.0; maxr = 0.0;
      // largest residual angle: the last threshold, (theta[L-1] + theta[L]) / 2
      // for the 8- and 4-entry tables and theta[15] / 2 for the 16-entry table
      thr = (L == 16) ? $atan(1.0 / 32768.0) / 2.0
                      : ($atan(1.0 / real'(64'd1 << (L - 1))) + $atan(1.0 / real'(64'd1 << L))) / 2.0;
      bound = $sin(thr) + 5e-6;
      @(posedge rst_n);
      for (int a = 0; a < 1024; a++) begin
        @(negedge clk);
        #1;
        while (!out_valid) begin
          @(negedge clk);
          #1;
        end
        xr = f2r(xs[a]); yr = f2r(ys[a]);
        zr = -PI * real'(a) / 1024.0;
        er = xr * $cos(zr) - yr * $sin(zr);
        ei = xr * $sin(zr) + yr * $cos(zr);
        mag = $sqrt(xr * xr + yr * yr);
        err = $sqrt((f2r(ox) - er) ** 2 + (f2r(oy) - ei) ** 2);
        mse += ((f2r(ox) - er) ** 2 + (f2r(oy) - ei) ** 2) / 2.0;
        if (err / mag > maxr) maxr = err / mag;
        checks++;
        if (err > bound * mag) begin
          failures++;
          $display("ACor_%0d angle %0d: error ratio %g above %g", L, a, err / mag, bound);
        end
      end
      clocks = cyc - t0 + 1;
      $display("ACor_%0d: 1024 angles in %0d clocks (reported %0d), MSE %.3e, max error ratio %.3f ppm",
               L, clocks, PAPER_LAT, mse / 1024.0, maxr * 1.0e6);
      checks++;
      if (real'(clocks) > 1.1 * real'(PAPER_LAT)) begin
        failures++;
        $display("ACor_%0d more than 10%% slower than reported", L);
      end
      fin[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
