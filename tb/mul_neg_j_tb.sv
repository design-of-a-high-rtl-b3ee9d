// mul_neg_j_tb: (re + j*im) * -j must give im - j*re; sel = 0 passes the
// value unchanged. Checked on random values in real arithmetic.
module mul_neg_j_tb;
  import tb_fp_pkg::*;
  import fft_pkg::*;

  logic  sel;
  cplx_t din, dout;
  int checks = 0, failures = 0;

  mul_neg_j dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real er, ei;
    for (int n = 0; n < 2000; n++) begin
      din.re = rand_f(-10, 10); din.im = rand_f(-10, 10);
      sel = 1'($urandom);
      #1;
      // multiply by (0 - j) or (1 + 0j) in complex arithmetic
      er = sel ? f2r(din.im)  : f2r(din.re);
      ei = sel ? -f2r(din.re) : f2r(din.im);
      checks++;
      if (f2r(dout.re) != er || f2r(dout.im) != ei) begin
        failures++;
        $display("sel=%0d din=%h/%h dout=%h/%h", sel, din.re, din.im, dout.re, dout.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
