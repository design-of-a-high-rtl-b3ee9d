// acordic: single-precision floating-point adaptive CORDIC complex multiplier
// (ACor), computing (ix + j*iy) * exp(j*iz).
//
// A conventional CORDIC runs through every table angle; the adaptive CORDIC
// lets RotSel pick only the angles that bring the residual angle nearest to
// zero, so a typical operation needs only a handful of rotations (15 degrees
// takes theta2, theta6, theta10, theta12 and -theta15 of the 16-entry table).
// FALU_XY rotates x and y, FMul_ki accumulates the matching length factor K,
// and FMulK_Norm applies K at the end. This structure is the source design's.
//
// The table angles add up to about 99.9 degrees, so before the iterations the
// angle is folded into [-45, 45) degrees by an exact multiplication by a power
// of j (swap real and imaginary parts and change signs). This folding, the
// binary angle encoding (2^32 = 360 degrees) and the handshake are this
// design's choices.
//
// Interface: in_valid/in_ready accept an operand when the unit is idle or
// scaling its previous result; out_valid pulses for one cycle with ox/oy, and
// iters gives the number of rotations that operation used. busy is high from
// the accept until the result is registered.
// Timing: after the accept edge, one clock per rotation (at least one clock),
// the last one also seeing that the residual is within the stop threshold,
// then one clock to scale by K: out_valid is high max(n,1) + 1 clocks after
// the accept edge for n rotations, and operands can follow every
// max(n,1) + 1 clocks.
module acordic
  import fp_pkg::*;
  import fft_pkg::*;
#(
  parameter int NUM_ANGLES = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  float_t     ix,
  input  float_t     iy,
  input  angle_t     iz,
  output logic       out_valid,
  output float_t     ox,
  output float_t     oy,
  output logic [4:0] iters,
  output logic       busy
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_NORM} state_e;
  state_e state;

  angle_t     z;
  logic       rotate, neg, last;
  logic [3:0] idx;
  angle_t     z_next;
  logic [31:0] z_next_mag;
  logic        done_next;

  // quadrant folding of the input angle
  logic [1:0] quad;
  angle_t     z_fold;
  float_t     fx, fy;

  always_comb begin
    quad   = 2'(({iz} + 32'h2000_0000) >> 30);
    z_fold = iz - {quad, 30'd0};
    unique case (quad)
      2'd0:    begin fx = ix;         fy = iy;         end
      2'd1:    begin fx = fp_neg(iy); fy = ix;         end   // * j
      2'd2:    begin fx = fp_neg(ix); fy = fp_neg(iy); end   // * -1
      default: begin fx = iy;         fy = fp_neg(ix); end   // * -j
    endcase
  end

  logic   load, step;
  float_t xr, yr;
  logic [23:0] k;
  float_t nx, ny;

  // a new operand is taken while the previous result is being scaled
  assign in_ready = (state != S_ITER);
  assign busy     = (state != S_IDLE);
  assign load     = in_valid && in_ready;
  assign step     = (state == S_ITER) && rotate;

  rot_sel #(.NUM_ANGLES(NUM_ANGLES)) u_rotsel (
    .z(z), .rotate(rotate), .neg(neg), .idx(idx), .last(last), .z_next(z_next)
  );

  falu_xy u_falu (
    .clk(clk), .load(load), .ix(fx), .iy(fy),
    .step(step), .neg(neg), .idx(idx), .ox(xr), .oy(yr)
  );

  fmul_ki u_fmul (
    .clk(clk), .load(load), .step(step), .idx(idx), .ok(k)
  );

  fmulk_norm u_norm (
    .x(xr), .y(yr), .k(k), .ox(nx), .oy(ny)
  );

  // stop as soon as the new residual is within the last threshold
  always_comb begin
    z_next_mag = z_next[31] ? (~z_next + 32'd1) : z_next;
    done_next  = last || (z_next_mag <= C_THR[NUM_ANGLES-1]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      out_valid <= 1'b0;
      z         <= '0;
      iters     <= '0;
      ox        <= '0;
      oy        <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (load) begin
          z     <= z_fold;
          iters <= '0;
          state <= S_ITER;
        end
        S_ITER: begin
          if (rotate) begin
            z     <= z_next;
            iters <= iters + 5'd1;
            if (done_next) state <= S_NORM;
          end else begin
            state <= S_NORM;           // no rotation needed at all
          end
        end
        default: begin
          ox        <= nx;
          oy        <= ny;
          out_valid <= 1'b1;
          if (load) begin
            z     <= z_fold;
            iters <= '0;
            state <= S_ITER;
          end else begin
            state <= S_IDLE;
          end
        end
      endcase
    end
  end

endmodule
