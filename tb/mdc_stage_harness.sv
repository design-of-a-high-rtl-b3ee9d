// mdc_stage_harness: drives one mdc_stage and checks it against the radix-2
// DIF stage computed in double precision.
//
// Blocks of M random complex samples are generated in pairs, as the previous
// stage would send them: with DUAL_IN the first block of each pair goes on
// input lane A and the second on lane B, each lane with its own random gaps;
// without DUAL_IN all blocks go on lane A. For each block a, in the order
// A, B, A, B, ..., the expected results are the M/2 sums a[j] + a[j+M/2] and
// the M/2 differences (a[j] - a[j+M/2]) * exp(-j*2*pi*j/M). Sums are expected
// on output lane A and differences on lane B, or with SERIAL_OUT both on lane
// A, sums first. Both sinks apply random back-pressure. Errors are measured
// against the largest magnitude in the block. Reports through its ports.
module mdc_stage_harness
  import tb_fp_pkg::*;
  import fft_pkg::*;
#(
  parameter int        LOG_M      = 4,
  parameter mul_kind_e MUL_KIND   = MUL_ACOR,
  parameter bit        REAL_INPUT = 1'b0,
  parameter bit        DUAL_IN    = 1'b1,
  parameter bit        SERIAL_OUT = 1'b0,
  parameter int        NPAIR      = 4,
  parameter real       TOL        = 3e-5
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   backpressure,
  output int   dual,
  output logic done
);

  localparam int M    = 2 ** LOG_M;
  localparam int NBLK = 2 * NPAIR;

  logic  a_valid, a_ready, b_valid, b_ready, oa_valid, oa_ready, ob_valid, ob_ready;
  logic  bf_fire, stall_mul, dual_xfer;
  cplx_t a_data, b_data, oa_data, ob_data;

  mdc_stage #(.LOG_M(LOG_M), .NUM_ANGLES(16), .MUL_KIND(MUL_KIND), .REAL_INPUT(REAL_INPUT),
              .DUAL_IN(DUAL_IN), .SERIAL_OUT(SERIAL_OUT)) dut (.*);

  cplx_t blk [NBLK][M];
  real   qa_re [$], qa_im [$], qa_mag [$];
  real   qb_re [$], qb_im [$], qb_mag [$];
  int    na_exp, nb_exp;

  initial begin
    real ar [M], ai [M], mx, w, dr, di;
    for (int b = 0; b < NBLK; b++) begin
      mx = 0.0;
      for (int n = 0; n < M; n++) begin
        blk[b][n].re = rand_f(-3, 3);
        blk[b][n].im = REAL_INPUT ? 32'h0 : rand_f(-3, 3);
        ar[n] = f2r(blk[b][n].re); ai[n] = f2r(blk[b][n].im);
        if ($sqrt(ar[n] ** 2 + ai[n] ** 2) > mx) mx = $sqrt(ar[n] ** 2 + ai[n] ** 2);
      end
      for (int j = 0; j < M / 2; j++) begin
        qa_re.push_back(ar[j] + ar[j + M/2]);
        qa_im.push_back(ai[j] + ai[j + M/2]);
        qa_mag.push_back(mx);
      end
      for (int j = 0; j < M / 2; j++) begin
        dr = ar[j] - ar[j + M/2];
        di = ai[j] - ai[j + M/2];
        w  = -2.0 * PI * real'(j) / real'(M);
        if (SERIAL_OUT) begin
          qa_re.push_back(dr * $cos(w) - di * $sin(w));
          qa_im.push_back(dr * $sin(w) + di * $cos(w));
          qa_mag.push_back(mx);
        end else begin
          qb_re.push_back(dr * $cos(w) - di * $sin(w));
          qb_im.push_back(dr * $sin(w) + di * $cos(w));
          qb_mag.push_back(mx);
        end
      end
    end
    na_exp = qa_re.size();
    nb_exp = qb_re.size();
  end

  // lane A driver: every block (single lane) or the even blocks (dual)
  initial begin
    a_valid = 0; a_data = '0;
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b += (DUAL_IN ? 2 : 1))
      for (int n = 0; n < M; n++) begin
        @(negedge clk);
        while ($urandom_range(3, 0) == 0) begin
          a_valid = 0;
          @(negedge clk);
        end
        a_valid = 1; a_data = blk[b][n];
        #1;
        while (!a_ready) begin
          @(negedge clk);
          #1;
        end
        @(posedge clk);
        #1 a_valid = 0;
      end
  end

  // lane B driver: the odd blocks (dual only)
  initial begin
    b_valid = 0; b_data = '0;
    @(posedge rst_n);
    if (DUAL_IN)
      for (int b = 1; b < NBLK; b += 2)
        for (int n = 0; n < M; n++) begin
          @(negedge clk);
          while ($urandom_range(3, 0) == 0) begin
            b_valid = 0;
            @(negedge clk);
          end
          b_valid = 1; b_data = blk[b][n];
          #1;
          while (!b_ready) begin
            @(negedge clk);
            #1;
          end
          @(posedge clk);
          #1 b_valid = 0;
        end
  end

  // sinks: compare each transfer with the head of its lane's queue
  int nout_a, nout_b;

  task automatic compare(input cplx_t got, ref real qre [$], ref real qim [$],
                         ref real qmag [$], input int idx, input string lane);
    real er, ei;
    er = qre.pop_front(); ei = qim.pop_front();
    checks++;
    if ($sqrt((f2r(got.re) - er) ** 2 + (f2r(got.im) - ei) ** 2) > TOL * qmag.pop_front()) begin
      failures++;
      if (failures < 10)
        $display("LOG_M=%0d lane %s output %0d: got (%g, %g) expected (%g, %g)", LOG_M, lane,
                 idx, f2r(got.re), f2r(got.im), er, ei);
    end
  endtask

  initial begin
    done = 0; oa_ready = 0; ob_ready = 0; nout_a = 0; nout_b = 0;
    checks = 0; failures = 0; stalls = 0; backpressure = 0; dual = 0;
    @(posedge rst_n);
    while (nout_a < na_exp || nout_b < nb_exp) begin
      @(negedge clk);
      oa_ready = ($urandom_range(4, 0) != 0);
      ob_ready = ($urandom_range(4, 0) != 0);
      #1;
      if (stall_mul) stalls++;
      if (dual_xfer) dual++;
      if ((oa_valid && !oa_ready) || (ob_valid && !ob_ready)) backpressure++;
      if (oa_valid && oa_ready) begin
        if (nout_a < na_exp) compare(oa_data, qa_re, qa_im, qa_mag, nout_a, "A");
        else begin
          failures++;
          $display("extra output on lane A");
        end
        nout_a++;
      end
      if (ob_valid && ob_ready) begin
        if (nout_b < nb_exp) compare(ob_data, qb_re, qb_im, qb_mag, nout_b, "B");
        else begin
          failures++;
          $display("extra output on lane B");
        end
        nout_b++;
      end
      @(posedge clk);
    end
    done = 1;
  end

endmodule
