// stage_buffer_tb: random valid on the input and random ready on the output;
// every accepted word must come out once, in order, an offered output must
// be held until taken, and with a ready sink the buffer must pass one word
// per clock.
module stage_buffer_tb;

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, out_valid, out_ready;
  logic [63:0] in_data, out_data;
  int checks = 0, failures = 0;

  stage_buffer #(.WIDTH(64)) dut (.*);

  always #5 clk = ~clk;

  logic [63:0] q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0, got = 0, full_rate = 0;
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      // last 1000 cycles: always valid, always ready
      in_valid  = (n >= 5000) ? 1'b1 : 1'($urandom);
      out_ready = (n >= 5000) ? 1'b1 : 1'($urandom);
      if (in_valid) in_data = {$urandom, 32'(sent)};
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (q.size() == 0 || out_data != q[0]) begin
          failures++;
          $display("cycle %0d: unexpected output %h", n, out_data);
        end
        if (q.size() > 0) void'(q.pop_front());
        got++;
        if (n >= 5010) full_rate++;
      end
      if (in_valid && in_ready) begin
        q.push_back(in_data);
        sent++;
      end
    end
    checks++;
    if (full_rate != 990) begin
      failures++;
      $display("throughput with a ready sink: %0d of 990", full_rate);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
