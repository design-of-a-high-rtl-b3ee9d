// shift_reg: the delay buffers Shift_reg1 and Shift_reg2 of an FFT stage.
//
// A first-in first-out delay line of DEPTH words. Because the stages stall
// whenever the CORDIC or the next stage is busy, the delay line is built as a
// circular buffer in a memory array (write and read pointers) instead of a
// chain of registers that shifts every clock; data leaves in the order it
// came in, as from a shift register. Pushing into a full buffer or popping an
// empty one is a usage error, flagged by assertions.
//
// Interface: push/din write at the clock edge; dout is the oldest entry
// (combinational read), pop removes it at the edge; count is the fill level.
module shift_reg #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 64,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  assign dout = mem[rp];

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   push && !pop |-> count < (AW+1)'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> count != '0);

endmodule
