// fmulk_norm_tb: multiplies random single-precision values by random length
// factors in (0.6, 1] and compares with the correctly rounded product worked
// out in double precision.
module fmulk_norm_tb;
  import tb_fp_pkg::*;

  logic [31:0] x, y, ox, oy;
  logic [23:0] k;
  int checks = 0, failures = 0;

  fmulk_norm dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real kr;
    logic [31:0] ex, ey;
    for (int n = 0; n < 5000; n++) begin
      x = rand_f(-20, 20); y = rand_f(-20, 20);
      k = (n == 0) ? 24'h800000 : 24'($urandom_range(8388608, 5033165));
      if (n == 1) x = 32'h0;
      #1;
      kr = real'(k) / 8388608.0;
      ex = r2f(f2r(x) * kr);
      ey = r2f(f2r(y) * kr);
      checks++;
      if (ox != ex || oy != ey) begin
        failures++;
        $display("x=%h y=%h k=%h: got %h %h expected %h %h", x, y, k, ox, oy, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
