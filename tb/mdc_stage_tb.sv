// mdc_stage_tb: runs the stage variants of the FFT through mdc_stage_harness:
//   0: 16-point CORDIC stage with two input lanes (a middle stage);
//   1: 8-point CORDIC stage, one real input lane (the first stage);
//   2: 4-point -j stage, two input lanes (the tenth stage);
//   3: 2-point stage without multiplier, one output stream (the last stage).
// Each must produce every block correctly. The CORDIC stages must also be
// seen waiting for their CORDIC, the two-lane stages must take both input
// lanes in one clock at least once, and output back-pressure must occur.
module mdc_stage_tb;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c [4], f [4], st [4], bp [4], du [4];
  logic d [4];

  mdc_stage_harness #(.LOG_M(4), .MUL_KIND(MUL_ACOR), .REAL_INPUT(0), .DUAL_IN(1),
                      .SERIAL_OUT(0), .NPAIR(4)) h0 (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .stalls(st[0]), .backpressure(bp[0]),
    .dual(du[0]), .done(d[0]));
  mdc_stage_harness #(.LOG_M(3), .MUL_KIND(MUL_ACOR), .REAL_INPUT(1), .DUAL_IN(0),
                      .SERIAL_OUT(0), .NPAIR(4)) h1 (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .stalls(st[1]), .backpressure(bp[1]),
    .dual(du[1]), .done(d[1]));
  mdc_stage_harness #(.LOG_M(2), .MUL_KIND(MUL_NEGJ), .REAL_INPUT(0), .DUAL_IN(1),
                      .SERIAL_OUT(0), .NPAIR(15), .TOL(1e-6)) h2 (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .stalls(st[2]), .backpressure(bp[2]),
    .dual(du[2]), .done(d[2]));
  mdc_stage_harness #(.LOG_M(1), .MUL_KIND(MUL_NONE), .REAL_INPUT(0), .DUAL_IN(1),
                      .SERIAL_OUT(1), .NPAIR(30), .TOL(1e-6)) h3 (
    .clk, .rst_n, .checks(c[3]), .failures(f[3]), .stalls(st[3]), .backpressure(bp[3]),
    .dual(du[3]), .done(d[3]));

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3]);
    checks   = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3];
    for (int i = 0; i < 4; i++) begin
      $display("config %0d: %0d outputs checked, %0d CORDIC stalls, %0d back-pressure cycles, %0d two-lane inputs",
               i, c[i], st[i], bp[i], du[i]);
      checks++;
      if (c[i] == 0 || bp[i] == 0 || (i < 2 && st[i] == 0) || (i != 1 && du[i] == 0))
        failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
