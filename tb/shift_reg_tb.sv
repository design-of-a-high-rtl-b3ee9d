// shift_reg_tb: random pushes and pops (never past full or empty) on a small
// and a one-entry delay buffer, checked against a queue model: data must come
// out in arrival order and count must track the fill level.
module shift_reg_tb;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        push_a, pop_a, push_b, pop_b;
  logic [63:0] din_a, dout_a, din_b, dout_b;
  logic [3:0]  count_a;
  logic [1:0]  count_b;

  shift_reg #(.DEPTH(8), .WIDTH(64)) dut_a (
    .clk, .rst_n, .push(push_a), .din(din_a), .pop(pop_a), .dout(dout_a), .count(count_a));
  shift_reg #(.DEPTH(1), .WIDTH(64)) dut_b (
    .clk, .rst_n, .push(push_b), .din(din_b), .pop(pop_b), .dout(dout_b), .count(count_b));

  logic [63:0] qa[$], qb[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_a = 0; pop_a = 0; push_b = 0; pop_b = 0; din_a = 0; din_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (int'(count_a) != qa.size() || int'(count_b) != qb.size() ||
          (qa.size() > 0 && dout_a != qa[0]) || (qb.size() > 0 && dout_b != qb[0])) begin
        failures++;
        $display("cycle %0d: count %0d/%0d model %0d/%0d", n, count_a, count_b, qa.size(), qb.size());
      end
      pop_a  = (qa.size() > 0) && ($urandom_range(2, 0) != 0);
      push_a = (qa.size() - int'(pop_a) < 8) && ($urandom_range(2, 0) != 0);
      din_a  = {$urandom, $urandom};
      pop_b  = (qb.size() > 0) && 1'($urandom);
      push_b = (qb.size() - int'(pop_b) < 1) && 1'($urandom);
      din_b  = {$urandom, $urandom};
      @(posedge clk);
      if (pop_a)  void'(qa.pop_front());
      if (push_a) qa.push_back(din_a);
      if (pop_b)  void'(qb.pop_front());
      if (push_b) qb.push_back(din_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
