// fft2048: pipelined 2^LOG2N-point (default 2048) radix-2 FFT in IEEE-754
// single precision, with adaptive CORDIC twiddle multipliers.
//
// The transform is a chain of LOG2N decimation-in-frequency stages in the
// multi-path delay commutator style (mdc_stage); stage s (from 0) works on
// blocks of 2^(LOG2N-s) samples. Every stage with blocks of 8 or more
// multiplies by its twiddles with an adaptive CORDIC, the 4-point stage uses
// the -j multiplexer, the 2-point stage has no multiplier, and the first
// stage is specialised for real input. Between two stages run two lanes,
// lane A with the sums and lane B with the twiddled differences of each
// block, and each lane has a two-entry data buffer (stage_buffer). This
// structure follows the source design; the valid/ready lanes are this
// design's choice.
//
// Interface: real input samples in_re (single precision) enter with
// valid/ready, 2^LOG2N per transform, back to back. Results leave with
// valid/ready as complex single-precision out_re/out_im in bit-reversed order
// (the natural order of a decimation-in-frequency pipeline); out_k gives the
// frequency index of each result. The output order and index port are this
// design's choices.
//
// Activity outputs, one bit per stage: bf_fire pulses when the stage's
// butterfly runs, stall_mul when a butterfly waits for the CORDIC, and
// dual_xfer when both input lanes transfer in the same clock.
//
// Timing: the pipeline is paced by the iterative CORDICs, each taking
// max(n,1) + 1 clocks for n rotations (about 6.3 on average with 16 table
// angles); a 2048-point transform takes about 14,100 clocks from first input
// to last output.
module fft2048
  import fp_pkg::*;
  import fft_pkg::*;
#(
  parameter int LOG2N      = 11,
  parameter int NUM_ANGLES = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  float_t           in_re,
  output logic             out_valid,
  input  logic             out_ready,
  output float_t           out_re,
  output float_t           out_im,
  output logic [LOG2N-1:0] out_k,
  output logic [LOG2N-1:0] bf_fire,
  output logic [LOG2N-1:0] stall_mul,
  output logic [LOG2N-1:0] dual_xfer
);

  // stage s input lanes A/B: *v/*r/*d; stage s output lanes A/B: o*v/o*r/o*d
  logic  av [LOG2N], ar [LOG2N], bv [LOG2N], br [LOG2N];
  cplx_t ad [LOG2N], bd [LOG2N];
  logic  oav[LOG2N], oar[LOG2N], obv[LOG2N], obr[LOG2N];
  cplx_t oad[LOG2N], obd[LOG2N];

  assign av[0]    = in_valid;
  assign in_ready = ar[0];
  assign ad[0]    = '{re: in_re, im: 32'h0};
  assign bv[0]    = 1'b0;
  assign bd[0]    = '0;

  for (genvar s = 0; s < LOG2N; s++) begin : g_stage
    localparam int        LM   = LOG2N - s;
    localparam mul_kind_e KIND = (LM >= 3) ? MUL_ACOR : ((LM == 2) ? MUL_NEGJ : MUL_NONE);

    mdc_stage #(
      .LOG_M(LM), .NUM_ANGLES(NUM_ANGLES), .MUL_KIND(KIND), .REAL_INPUT(s == 0),
      .DUAL_IN(s != 0), .SERIAL_OUT(s == LOG2N - 1)
    ) u_stage (
      .clk(clk), .rst_n(rst_n),
      .a_valid(av[s]), .a_ready(ar[s]), .a_data(ad[s]),
      .b_valid(bv[s]), .b_ready(br[s]), .b_data(bd[s]),
      .oa_valid(oav[s]), .oa_ready(oar[s]), .oa_data(oad[s]),
      .ob_valid(obv[s]), .ob_ready(obr[s]), .ob_data(obd[s]),
      .bf_fire(bf_fire[s]), .stall_mul(stall_mul[s]), .dual_xfer(dual_xfer[s])
    );

    if (s < LOG2N - 1) begin : g_buf
      stage_buffer #(.WIDTH(64)) u_buf_a (
        .clk(clk), .rst_n(rst_n),
        .in_valid(oav[s]), .in_ready(oar[s]), .in_data(oad[s]),
        .out_valid(av[s+1]), .out_ready(ar[s+1]), .out_data(ad[s+1])
      );
      stage_buffer #(.WIDTH(64)) u_buf_b (
        .clk(clk), .rst_n(rst_n),
        .in_valid(obv[s]), .in_ready(obr[s]), .in_data(obd[s]),
        .out_valid(bv[s+1]), .out_ready(br[s+1]), .out_data(bd[s+1])
      );
    end
  end

  assign out_valid       = oav[LOG2N-1];
  assign oar[LOG2N-1]    = out_ready;
  assign obr[LOG2N-1]    = 1'b1;
  assign out_re          = oad[LOG2N-1].re;
  assign out_im          = oad[LOG2N-1].im;

  // output position counter; the DIF result at position p is X(bitrev(p))
  logic [LOG2N-1:0] out_pos;

  always_ff @(posedge clk) begin
    if (!rst_n)                      out_pos <= '0;
    else if (out_valid && out_ready) out_pos <= out_pos + LOG2N'(1);
  end

  always_comb begin
    for (int b = 0; b < LOG2N; b++) out_k[b] = out_pos[LOG2N-1-b];
  end

endmodule
