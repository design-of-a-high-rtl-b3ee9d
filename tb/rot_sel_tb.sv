// rot_sel_tb: checks the rotation selection against thresholds recomputed in
// real arithmetic from atan(2^-i), and replays the 15-degree example of the
// adaptive CORDIC (theta2, theta6, theta10, theta12, then -theta15).
module rot_sel_tb;
  import tb_fp_pkg::*;

  localparam int L = 16;
  localparam real DEG2BAM = 4294967296.0 / 360.0;

  logic [31:0] z, z_next;
  logic        rotate, neg, last;
  logic [3:0]  idx;
  int checks = 0, failures = 0;

  rot_sel #(.NUM_ANGLES(L)) dut (.*);

  real th [L+1];
  real c  [L];

  function automatic int ref_idx(input real a);   // -1: no rotation
    if (a <= c[L-1]) return -1;
    for (int i = 0; i < L; i++) if (a > c[i]) return i;
    return L - 1;
  endfunction

  function automatic bit near_thr(input real a);
    for (int i = 0; i < L; i++) if (rabs(a - c[i]) < 1e-5) return 1;
    return 0;
  endfunction

  function automatic real bam2deg(input logic [31:0] v);
    return real'($signed(v)) / DEG2BAM;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, zd, exp_next;
    int  ri;
    int  seq_idx [5] = '{2, 6, 10, 12, 15};
    bit  seq_neg [5] = '{0, 0, 0, 0, 1};
    for (int i = 0; i <= L; i++) th[i] = $atan(2.0 ** (-i)) * 180.0 / PI;
    for (int i = 0; i < L - 1; i++) c[i] = (th[i] + th[i+1]) / 2.0;
    c[L-1] = th[L-1] / 2.0;

    // worked example: 15 degrees
    z = 32'(longint'(15.0 * DEG2BAM));
    for (int s = 0; s < 5; s++) begin
      #1;
      checks++;
      if (!rotate || idx != 4'(seq_idx[s]) || neg != seq_neg[s]) begin
        failures++;
        $display("15-degree example step %0d: rotate=%0d idx=%0d neg=%0d", s, rotate, idx, neg);
      end
      z = z_next;
    end
    #1;
    checks++;
    zd = bam2deg(z);
    if (rotate || rabs((15.0 - zd) - 14.999609769) > 1e-6) begin
      failures++;
      $display("15-degree example end: rotate=%0d angle=%f", rotate, 15.0 - zd);
    end

    // random residual angles in [-45, 45] degrees, log-distributed magnitude
    for (int n = 0; n < 4000; n++) begin
      a  = 45.0 * (2.0 ** (-real'($urandom_range(20000, 0)) / 1000.0));
      if (near_thr(a)) continue;
      zd = ($urandom_range(1, 0) == 1) ? -a : a;
      z  = 32'(longint'(zd * DEG2BAM));
      #1;
      ri = ref_idx(a);
      checks++;
      if (ri < 0) begin
        if (rotate) begin
          failures++;
          $display("z=%f: rotation not expected", zd);
        end
      end else begin
        exp_next = (zd < 0.0) ? zd + th[ri] : zd - th[ri];
        if (!rotate || int'(idx) != ri || neg != (zd < 0.0) || last != (ri == L - 1) ||
            rabs(bam2deg(z_next) - exp_next) > 1e-6) begin
          failures++;
          $display("z=%f: got rotate=%0d idx=%0d neg=%0d next=%f, expected idx=%0d next=%f",
                   zd, rotate, idx, neg, bam2deg(z_next), ri, exp_next);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
