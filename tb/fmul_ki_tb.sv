// fmul_ki_tb: accumulates random sequences of length factors and compares K
// with the product of cos(atan(2^-i)) computed in double precision.
module fmul_ki_tb;
  import tb_fp_pkg::*;

  logic        clk = 0, load, step;
  logic [3:0]  idx;
  logic [23:0] ok;
  int checks = 0, failures = 0;

  fmul_ki dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real kr, got;
    load = 0; step = 0; idx = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      kr = 1.0;
      checks++;
      if (ok != 24'h800000) begin
        failures++;
        $display("K not reset to 1: %h", ok);
      end
      for (int k = 0; k < 16; k++) begin
        idx  = 4'($urandom);
        step = 1;
        @(negedge clk);
        step = 0;
        kr  = kr * $cos($atan(1.0 / real'(32'd1 << idx)));
        got = real'(ok) / 8388608.0;
        checks++;
        if (rabs(got - kr) > 2.0 ** (-23) * (k + 2)) begin
          failures++;
          $display("after %0d steps (idx %0d): K=%f expected %f", k + 1, idx, got, kr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
