// fft_tables_tb: the 2048-point FFT workload with the 8- and 4-entry angle
// tables (FFT_ACor_8 and FFT_ACor_4; the 16-entry table is the default and
// has its own full-size test). One transform of random integer-valued real
// samples per design. Every output must arrive in bit-reversed order; the
// mean square error and the largest error ratio against a double-precision
// DFT are printed, the rms error must stay below the CORDIC's worst-case
// relative error times the rms output times 3 (independent errors of nine
// CORDIC stages add up as sqrt(9)), and the clocks from first input to
// last output must stay within the reported latency (7457 and 5032 clocks)
// plus one frame of input time.
module fft_tables_tb;
  import tb_fp_pkg::*;

  localparam int LOG2N = 11;
  localparam int N     = 2048;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  logic fin [2];

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xin [N];
  real cw [N], sw [N];
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int m = 0; m < N; m++) begin
      cw[m] = $cos(2.0 * PI * real'(m) / real'(N));
      sw[m] = $sin(2.0 * PI * real'(m) / real'(N));
      xin[m] = real'($urandom_range(2000, 0)) - 1000.0;
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_tab
    localparam int L         = (g == 0) ? 8 : 4;
    localparam int PAPER_LAT = (g == 0) ? 7457 : 5032;
    // worst-case relative error of one CORDIC: sine of the last threshold
    localparam real CERR     = (g == 0) ? 0.00586 : 0.0933;

    logic             in_valid, in_ready, out_valid, out_ready;
    logic [31:0]      in_re, out_re, out_im;
    logic [LOG2N-1:0] out_k, bf_fire, stall_mul, dual_xfer;
    longint           t_first = 0;

    fft2048 #(.LOG2N(LOG2N), .NUM_ANGLES(L)) dut (.*);

    initial begin
      in_valid = 0; in_re = 0;
      @(posedge rst_n);
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1; in_re = r2f(xin[n]);
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        if (n == 0) t_first = cyc;
        @(posedge clk);
        #1 in_valid = 0;
      end
    end

    initial begin
      real rms, er, ei, mse, maxr, e2;
      int  k;
      bit  order_ok;
      longint clocks;
      out_ready = 1; fin[g] = 0; mse = 0.0; maxr = 0.0; rms = 0.0; order_ok = 1;
      @(posedge rst_n);
      for (int n = 0; n < N; n++) rms += xin[n] ** 2;
      rms = $sqrt(rms);
      for (int p = 0; p < N; p++) begin
        @(negedge clk);
        #1;
        while (!out_valid) begin
          @(negedge clk);
          #1;
        end
        k = int'(out_k);
        for (int b = 0; b < LOG2N; b++)
          if (((p >> b) & 1) != ((k >> (LOG2N - 1 - b)) & 1)) order_ok = 0;
        er = 0.0; ei = 0.0;
        for (int n = 0; n < N; n++) begin
          er += xin[n] * cw[(k * n) % N];
          ei -= xin[n] * sw[(k * n) % N];
        end
        e2 = (f2r(out_re) - er) ** 2 + (f2r(out_im) - ei) ** 2;
        mse += e2 / 2.0;
        if ($sqrt(e2 / (er * er + ei * ei + 1e-30)) > maxr) maxr = $sqrt(e2 / (er * er + ei * ei + 1e-30));
        if (p == N - 1) clocks = cyc - t_first + 1;
        @(posedge clk);
      end
      $display("FFT_ACor_%0d: %0d clocks (reported %0d), MSE %.3e, largest error ratio %.3e, rms error / rms output %.3e",
               L, clocks, PAPER_LAT, mse / real'(N), maxr, $sqrt(2.0 * mse / real'(N)) / rms);
      checks += 3;
      if (!order_ok) begin
        failures++;
        $display("FFT_ACor_%0d: outputs not in bit-reversed order", L);
      end
      if ($sqrt(2.0 * mse / real'(N)) > 3.0 * CERR * rms) begin
        failures++;
        $display("FFT_ACor_%0d: error too large", L);
      end
      if (clocks > longint'(PAPER_LAT + N)) begin
        failures++;
        $display("FFT_ACor_%0d: slower than reported", L);
      end
      fin[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
