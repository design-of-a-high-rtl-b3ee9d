// fft2048_tb: end-to-end test of the pipelined floating-point FFT at a
// reduced size (64 points, so six stages: four CORDIC stages, the -j stage
// and the multiplier-free stage). Several transforms of random integer-valued
// real samples (and one pure tone) are streamed back to back with random
// input gaps and random output back-pressure. Each output X(k), taken in
// bit-reversed order with its index out_k, is compared with a direct DFT in
// double precision; the error must stay below 3e-4 of the rms output value.
// The test also requires that every stage's butterfly ran, every CORDIC stage
// stalled on its CORDIC, every two-lane stage took both input lanes in one
// clock at least once, the -j and pass-through stages were used, and that
// input stalls and output back-pressure both happened.
module fft2048_tb;
  import tb_fp_pkg::*;

  localparam int LOG2N = 6;
  localparam int N     = 2 ** LOG2N;
  localparam int NFFT  = 4;

  logic             clk = 0, rst_n = 0;
  logic             in_valid, in_ready, out_valid, out_ready;
  logic [31:0]      in_re, out_re, out_im;
  logic [LOG2N-1:0] out_k, bf_fire, stall_mul, dual_xfer;
  int checks = 0, failures = 0;

  fft2048 #(.LOG2N(LOG2N), .NUM_ANGLES(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xin [NFFT][N];
  real cw [N], sw [N];

  initial begin
    in_valid = 0; in_re = 0;
    for (int m = 0; m < N; m++) begin
      cw[m] = $cos(2.0 * PI * real'(m) / real'(N));
      sw[m] = $sin(2.0 * PI * real'(m) / real'(N));
    end
    for (int t = 0; t < NFFT; t++)
      for (int n = 0; n < N; n++)
        xin[t][n] = (t == 1) ? $floor(1000.0 * cw[(5 * n) % N] + 0.5)
                             : real'($urandom_range(2000, 0)) - 1000.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NFFT; t++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        while ($urandom_range(7, 0) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1; in_re = r2f(xin[t][n]);
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        @(posedge clk);
        #1 in_valid = 0;
      end
  end

  int fire_cnt [LOG2N], stall_cnt [LOG2N], dual_cnt [LOG2N];
  int in_stall = 0, backpressure = 0;

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < LOG2N; s++) begin
      if (bf_fire[s])   fire_cnt[s]++;
      if (stall_mul[s]) stall_cnt[s]++;
      if (dual_xfer[s]) dual_cnt[s]++;
    end
    if (in_valid && !in_ready)   in_stall++;
    if (out_valid && !out_ready) backpressure++;
  end

  initial begin
    real rms, er, ei, err, maxerr;
    int  k;
    out_ready = 0;
    for (int s = 0; s < LOG2N; s++) begin
      fire_cnt[s] = 0; stall_cnt[s] = 0; dual_cnt[s] = 0;
    end
    @(posedge rst_n);
    for (int t = 0; t < NFFT; t++) begin
      rms = 0.0; maxerr = 0.0;
      for (int n = 0; n < N; n++) rms += xin[t][n] ** 2;
      rms = $sqrt(rms);
      for (int p = 0; p < N; p++) begin
        @(negedge clk);
        out_ready = ($urandom_range(3, 0) != 0);
        #1;
        while (!(out_valid && out_ready)) begin
          @(negedge clk);
          out_ready = ($urandom_range(3, 0) != 0);
          #1;
        end
        k = int'(out_k);
        checks++;
        // bit-reversed output order
        for (int b = 0; b < LOG2N; b++)
          if (((p >> b) & 1) != ((k >> (LOG2N - 1 - b)) & 1)) begin
            failures++;
            $display("position %0d has index %0d", p, k);
            break;
          end
        er = 0.0; ei = 0.0;
        for (int n = 0; n < N; n++) begin
          er += xin[t][n] * cw[(k * n) % N];
          ei -= xin[t][n] * sw[(k * n) % N];
        end
        err = $sqrt((f2r(out_re) - er) ** 2 + (f2r(out_im) - ei) ** 2);
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 3e-4 * rms) begin
          failures++;
          $display("FFT %0d X(%0d): got (%g, %g) expected (%g, %g)", t, k,
                   f2r(out_re), f2r(out_im), er, ei);
        end
        @(posedge clk);
      end
      $display("FFT %0d: largest error %.3e of rms %.3e", t, maxerr, rms);
    end
    @(negedge clk);
    out_ready = 1;
    for (int s = 0; s < LOG2N; s++) begin
      $display("stage %0d: %0d butterflies, %0d CORDIC stalls, %0d two-lane inputs",
               s + 1, fire_cnt[s], stall_cnt[s], dual_cnt[s]);
      checks++;
      if (fire_cnt[s] != NFFT * N / 2 || (LOG2N - s >= 3 && stall_cnt[s] == 0) ||
          (s > 0 && dual_cnt[s] == 0)) failures++;
    end
    $display("input stalls %0d, output back-pressure cycles %0d", in_stall, backpressure);
    checks += 2;
    if (in_stall == 0) failures++;
    if (backpressure == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
