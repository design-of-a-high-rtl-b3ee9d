// falu_xy_tb: loads random single-precision x, y and applies random
// micro-rotations, comparing each step with the same recurrence evaluated in
// double precision: x' = x - s*y*2^-i, y' = y + s*x*2^-i.
module falu_xy_tb;
  import tb_fp_pkg::*;

  logic        clk = 0, load, step, neg;
  logic [31:0] ix, iy, ox, oy;
  logic [3:0]  idx;
  int checks = 0, failures = 0;

  falu_xy dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x, y, xn, yn, s, tol;
    load = 0; step = 0; neg = 0; idx = 0; ix = 0; iy = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      ix = rand_f(-4, 8); iy = rand_f(-4, 8);
      load = 1;
      @(negedge clk);
      load = 0;
      x = f2r(ix); y = f2r(iy);
      checks++;
      if (ox != ix || oy != iy) begin
        failures++;
        $display("load mismatch");
      end
      for (int k = 0; k < 6; k++) begin
        neg = 1'($urandom); idx = 4'($urandom);
        step = 1;
        @(negedge clk);
        step = 0;
        s  = neg ? -1.0 : 1.0;
        xn = x - s * y * (1.0 / real'(32'd1 << idx));
        yn = y + s * x * (1.0 / real'(32'd1 << idx));
        // one rounding of each term's inputs and result
        tol = 2.0 ** (-23) * (rabs(x) + rabs(y)) * 1.01;
        checks++;
        if (rabs(f2r(ox) - xn) > tol || rabs(f2r(oy) - yn) > tol) begin
          failures++;
          $display("step idx=%0d neg=%0d: got (%g, %g) expected (%g, %g)",
                   idx, neg, f2r(ox), f2r(oy), xn, yn);
        end
        x = f2r(ox); y = f2r(oy);
      end
      // hold: neither load nor step leaves the registers alone
      @(negedge clk);
      checks++;
      if (f2r(ox) != x || f2r(oy) != y) begin
        failures++;
        $display("registers changed without step");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
