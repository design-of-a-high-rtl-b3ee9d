// mdc_stage: one radix-2 decimation-in-frequency stage of the multi-path
// delay commutator (MDC) FFT.
//
// The stage works on blocks of M = 2^LOG_M samples, pairing sample j with
// sample j + M/2, in the four transactions of the source design:
//   1. the first M/2 samples of a block are stored in Shift_reg1;
//   2. each of the next M/4 samples meets its partner from Shift_reg1 in the
//      floating-point butterfly; the sum leaves on output lane A, the
//      difference is multiplied by the twiddle exp(-j*2*pi*j/M) and stored
//      in Shift_reg2, which holds M/4 values;
//   3. the last M/4 butterflies: sums leave on lane A while Shift_reg2
//      passes its older twiddled differences out on lane B and takes the
//      new ones;
//   4. the rest of Shift_reg2 leaves on lane B.
// Lane A thus carries the sum half-block and lane B the difference
// half-block of every block: exactly the two blocks of size M/2 the next
// stage needs. The next stage receives the two lanes together; lane A's
// block is paired first, and the first half of lane B's block enters
// Shift_reg1 as lane A's partners leave it (transaction 3 of that stage).
// Shift_reg1 therefore serves both input lanes, in block order A, B, A, B.
//
// MUL_KIND selects the twiddle hardware: the adaptive CORDIC (acordic) for
// general stages, the -j multiplexer (mul_neg_j) for the 4-point stage and
// none for the 2-point stage. REAL_INPUT ties the imaginary input to zero
// (first stage, real input); DUAL_IN = 0 gives a single input lane (first
// stage). SERIAL_OUT = 1 (last stage) sends the sum and then the difference
// of each block on lane A alone, giving one output stream; Shift_reg2 then
// holds M/2 values. These stage variants follow the source design.
//
// This design's choices: every lane uses valid/ready, so the stage simply
// holds whenever the CORDIC, Shift_reg2 or the next stage is busy; the
// delays of Shift_reg1 and Shift_reg2 become FIFOs whose order, not their
// timing, carries the delay-commutator schedule. A butterfly runs only when
// Shift_reg2 has room for its difference, counting results still in the
// CORDIC.
//
// Timing: one butterfly per clock at most; with the CORDIC a butterfly costs
// about 3 + (rotations) clocks. Accepting data into Shift_reg1 costs no extra
// clock and can overlap a butterfly on the other lane.
module mdc_stage
  import fp_pkg::*;
  import fft_pkg::*;
#(
  parameter int        LOG_M      = 11,
  parameter int        NUM_ANGLES = 16,
  parameter mul_kind_e MUL_KIND   = MUL_ACOR,
  parameter bit        REAL_INPUT = 1'b0,
  parameter bit        DUAL_IN    = 1'b1,
  parameter bit        SERIAL_OUT = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  // input lane A (and the only input lane when DUAL_IN = 0)
  input  logic  a_valid,
  output logic  a_ready,
  input  cplx_t a_data,
  // input lane B
  input  logic  b_valid,
  output logic  b_ready,
  input  cplx_t b_data,
  // output lane A: sums (with SERIAL_OUT, sums then differences)
  output logic  oa_valid,
  input  logic  oa_ready,
  output cplx_t oa_data,
  // output lane B: twiddled differences (unused with SERIAL_OUT)
  output logic  ob_valid,
  input  logic  ob_ready,
  output cplx_t ob_data,
  // activity strobes (for monitoring)
  output logic  bf_fire,
  output logic  stall_mul,
  output logic  dual_xfer
);

  localparam int HALF = 2 ** (LOG_M - 1);
  localparam int AW   = (HALF > 1) ? $clog2(HALF) : 1;
  localparam int D2   = SERIAL_OUT ? HALF : ((HALF / 2 > 0) ? HALF / 2 : 1);
  localparam int AW2  = (D2 > 1) ? $clog2(D2) : 1;

  logic [LOG_M-1:0] cnt_a, cnt_b, cnt_p;
  logic             first_a, first_b;
  logic             push_turn_b, pair_turn_b;   // 0: lane A's block, 1: lane B's
  logic [LOG_M-1:0] j;

  cplx_t       a_in, p_in, sr1_din, sr1_dout, sr2_dout, sr2_din, bf_sum, bf_diff;
  logic [AW:0] sr1_count;
  logic [AW2:0] sr2_count;

  logic mul_ready, sr1_room, sr2_room, need_drain;
  logic [1:0] mul_busy;
  logic p_valid, can_fire, fire, push_a, push_b, sr2_push, sr2_pop;
  logic [AW:0] drain_cnt;

  always_comb begin
    a_in = a_data;
    if (REAL_INPUT) a_in.im = '0;
  end

  assign first_a = !cnt_a[LOG_M-1];
  assign first_b = !cnt_b[LOG_M-1];

  // lane whose block is being paired
  assign p_valid = pair_turn_b ? (b_valid && !first_b) : (a_valid && !first_a);
  assign p_in    = pair_turn_b ? b_data : a_in;
  assign cnt_p   = pair_turn_b ? cnt_b : cnt_a;
  assign j       = cnt_p & LOG_M'(HALF - 1);

  // Shift_reg2 must have room for this difference and one still in the CORDIC
  assign sr2_room = (int'(sr2_count) + int'(mul_busy)) < D2;
  assign can_fire = mul_ready && sr2_room && oa_ready && !need_drain;
  assign fire     = p_valid && can_fire;

  // Shift_reg1 can take a value if it has room or the butterfly frees a slot
  assign sr1_room = (int'(sr1_count) < HALF) || fire;
  assign push_a   = a_valid && first_a && !push_turn_b && sr1_room;
  assign push_b   = DUAL_IN && b_valid && first_b && push_turn_b && sr1_room;
  assign sr1_din = push_turn_b ? b_data : a_in;

  assign a_ready = first_a ? (!push_turn_b && sr1_room)
                           : (!pair_turn_b && can_fire);
  assign b_ready = DUAL_IN && (first_b ? (push_turn_b && sr1_room)
                                       : (pair_turn_b && can_fire));

  assign bf_fire   = fire;
  assign stall_mul = p_valid && !mul_ready;
  assign dual_xfer = (a_valid && a_ready) && (b_valid && b_ready);

  shift_reg #(.DEPTH(HALF), .WIDTH(64)) u_sr1 (
    .clk(clk), .rst_n(rst_n),
    .push(push_a || push_b), .din(sr1_din),
    .pop(fire), .dout(sr1_dout), .count(sr1_count)
  );

  fp_butterfly u_bf (.a(sr1_dout), .b(p_in), .sum(bf_sum), .diff(bf_diff));

  generate
    if (MUL_KIND == MUL_ACOR) begin : g_acor
      logic       acor_valid, acor_busy;
      float_t     ox, oy;
      logic [4:0] iters;
      angle_t     tw_angle;
      // twiddle exp(-j*2*pi*j/M): binary angle -(j * 2^32 / M)
      assign tw_angle = ~(angle_t'(j) << (32 - LOG_M)) + 32'd1;
      acordic #(.NUM_ANGLES(NUM_ANGLES)) u_acor (
        .clk(clk), .rst_n(rst_n),
        .in_valid(p_valid && sr2_room && oa_ready && !need_drain), .in_ready(mul_ready),
        .ix(bf_diff.re), .iy(REAL_INPUT ? 32'h0 : bf_diff.im), .iz(tw_angle),
        .out_valid(acor_valid), .ox(ox), .oy(oy), .iters(iters), .busy(acor_busy)
      );
      // results still to reach Shift_reg2: one in the CORDIC, one being written
      assign mul_busy = 2'(acor_busy) + 2'(acor_valid);
      assign sr2_push = acor_valid;
      assign sr2_din  = '{re: ox, im: oy};
    end else if (MUL_KIND == MUL_NEGJ) begin : g_negj
      assign mul_ready = 1'b1;
      assign mul_busy  = 2'd0;
      mul_neg_j u_negj (.sel(j[0]), .din(bf_diff), .dout(sr2_din));
      assign sr2_push = fire;
    end else begin : g_none
      assign mul_ready = 1'b1;
      assign mul_busy  = 2'd0;
      assign sr2_din   = bf_diff;
      assign sr2_push  = fire;
    end
  endgenerate

  shift_reg #(.DEPTH(D2), .WIDTH(64)) u_sr2 (
    .clk(clk), .rst_n(rst_n),
    .push(sr2_push), .din(sr2_din),
    .pop(sr2_pop), .dout(sr2_dout), .count(sr2_count)
  );

  generate
    if (SERIAL_OUT) begin : g_serial
      // differences of a block follow its sums on lane A
      assign sr2_pop  = need_drain && (sr2_count != '0) && oa_ready;
      assign oa_valid = need_drain ? (sr2_count != '0)
                                   : (p_valid && mul_ready && sr2_room);
      assign oa_data  = need_drain ? sr2_dout : bf_sum;
      assign ob_valid = 1'b0;
      assign ob_data  = '0;
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          need_drain <= 1'b0;
          drain_cnt  <= '0;
        end else begin
          if (fire && j == LOG_M'(HALF - 1)) need_drain <= 1'b1;
          if (sr2_pop) begin
            if (drain_cnt == (AW+1)'(HALF - 1)) begin
              drain_cnt  <= '0;
              need_drain <= 1'b0;
            end else begin
              drain_cnt <= drain_cnt + (AW+1)'(1);
            end
          end
        end
      end
    end else begin : g_dual
      assign need_drain = 1'b0;
      assign drain_cnt  = '0;
      assign sr2_pop    = (sr2_count != '0) && ob_ready;
      assign oa_valid   = p_valid && mul_ready && sr2_room;
      assign oa_data    = bf_sum;
      assign ob_valid   = (sr2_count != '0);
      assign ob_data    = sr2_dout;
    end
  endgenerate

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_a       <= '0;
      cnt_b       <= '0;
      push_turn_b <= 1'b0;
      pair_turn_b <= 1'b0;
    end else begin
      if (a_valid && a_ready) cnt_a <= cnt_a + LOG_M'(1);
      if (b_valid && b_ready) cnt_b <= cnt_b + LOG_M'(1);
      if (DUAL_IN) begin
        if ((push_a && cnt_a == LOG_M'(HALF - 1)) || (push_b && cnt_b == LOG_M'(HALF - 1)))
          push_turn_b <= !push_turn_b;
        if (fire && j == LOG_M'(HALF - 1))
          pair_turn_b <= !pair_turn_b;
      end
    end
  end

endmodule
