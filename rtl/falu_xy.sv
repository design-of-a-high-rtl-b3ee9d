// falu_xy: X and Y adder (FALU_XY) of the adaptive CORDIC.
//
// Holds the floating-point coordinates x and y. On load it takes ix/iy; on
// each step it applies one CORDIC micro-rotation by +-atan(2^-idx):
//   x <- x - s * y * 2^-idx,  y <- y + s * x * 2^-idx,  s = +1 or -1 (neg).
// The multiply by 2^-idx is an exponent decrement, so a step costs two
// floating-point additions, both done in the same clock. The recurrence is
// the source design's; keeping x and y as IEEE-754 single words is this
// design's choice (the hidden bit gives the same 24-bit mantissa).
//
// Timing: load and step take effect at the next rising clock edge; ox/oy are
// the registers. load has priority over step.
module falu_xy
  import fp_pkg::*;
(
  input  logic       clk,
  input  logic       load,
  input  float_t     ix,
  input  float_t     iy,
  input  logic       step,
  input  logic       neg,
  input  logic [3:0] idx,
  output float_t     ox,
  output float_t     oy
);

  float_t xs, ys, x_next, y_next;

  always_comb begin
    xs = fp_scale2(ox, {1'b0, idx});
    ys = fp_scale2(oy, {1'b0, idx});
    if (neg) begin
      x_next = fp_add(ox, ys);
      y_next = fp_sub(oy, xs);
    end else begin
      x_next = fp_sub(ox, ys);
      y_next = fp_add(oy, xs);
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      ox <= ix;
      oy <= iy;
    end else if (step) begin
      ox <= x_next;
      oy <= y_next;
    end
  end

endmodule
