// stage_buffer: data buffer between two FFT stages.
//
// The stages hold their data whenever the next one is not ready; this
// two-entry valid/ready FIFO sits between every pair of stages so that a
// stall travels back one stage per clock instead of through all stages in
// one combinational path. in_ready depends only on the buffer's own fill
// level, and with two entries it keeps full throughput. The buffers are
// named by the source design; their depth and handshake are this design's.
//
// Interface: a transfer happens on a clock edge where valid and ready are
// both high. out_data is the older entry. An assertion checks that an offered
// output stays offered until taken.
module stage_buffer #(
  parameter int WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  logic [WIDTH-1:0] d0, d1;     // d0 is the head
  logic [1:0]       cnt;
  logic             wr, rd;

  assign in_ready  = (cnt != 2'd2);
  assign out_valid = (cnt != 2'd0);
  assign out_data  = d0;
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= 2'd0;
    end else begin
      cnt <= cnt + {1'b0, wr} - {1'b0, rd};
    end
  end

  always_ff @(posedge clk) begin
    unique case ({wr, rd})
      2'b10: begin
        if (cnt == 2'd0) d0 <= in_data;
        else             d1 <= in_data;
      end
      2'b01: d0 <= d1;
      2'b11: begin
        if (cnt == 2'd1) d0 <= in_data;
        else begin
          d0 <= d1;
          d1 <= in_data;
        end
      end
      default: ;
    endcase
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
