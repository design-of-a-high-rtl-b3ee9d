// fp_butterfly_tb: random complex operands (including equal magnitudes,
// zeros and widely different exponents); sum and difference must equal the
// correctly rounded double-precision results.
module fp_butterfly_tb;
  import tb_fp_pkg::*;
  import fft_pkg::*;

  cplx_t a, b, sum, diff;
  int checks = 0, failures = 0;

  fp_butterfly dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] radd(input logic [31:0] p, input logic [31:0] q);
    return r2f(f2r(p) + f2r(q));   // exact in double, then one rounding
  endfunction

  initial begin
    cplx_t es, ed;
    for (int n = 0; n < 20000; n++) begin
      a.re = rand_f(-10, 10); a.im = rand_f(-10, 10);
      b.re = rand_f(-10, 10); b.im = rand_f(-10, 10);
      unique case (n % 5)
        0: b.re = a.re;                          // exact cancellation in diff
        1: b.im = {~a.im[31], a.im[30:0]};       // exact cancellation in sum
        2: a.re = 32'h0;
        3: b.im = {b.im[31], a.im[30:23], b.im[22:0]};   // same exponent
        default: ;
      endcase
      #1;
      es.re = radd(a.re, b.re); es.im = radd(a.im, b.im);
      ed.re = radd(a.re, {~b.re[31], b.re[30:0]});
      ed.im = radd(a.im, {~b.im[31], b.im[30:0]});
      checks++;
      if (f2r(sum.re) != f2r(es.re) || f2r(sum.im) != f2r(es.im) ||
          f2r(diff.re) != f2r(ed.re) || f2r(diff.im) != f2r(ed.im)) begin
        failures++;
        if (failures < 10)
          $display("a=%h/%h b=%h/%h: sum %h/%h (exp %h/%h) diff %h/%h (exp %h/%h)",
                   a.re, a.im, b.re, b.im, sum.re, sum.im, es.re, es.im,
                   diff.re, diff.im, ed.re, ed.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
