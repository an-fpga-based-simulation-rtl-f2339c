// tb_fire_start_buffer: random pushes and pops on a small buffer, compared with a
// queue; checks order, empty and full.
module tb_fire_start_buffer;
  import see_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  neuron_t din, head;
  neuron_t q[$];
  int checks = 0, failures = 0, n_full = 0;

  fire_start_buffer #(.DEPTH(16)) dut (.clk, .rst_n, .push, .din, .pop, .head, .empty, .full);

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      // alternate between filling and draining phases
      int bias;
      bias = (i / 100) % 2;
      push = !full && ($urandom_range(0, 3) < (bias ? 4 : 1));
      pop  = !empty && ($urandom_range(0, 3) < (bias ? 1 : 4));
      din  = NEURON_W'($urandom);
      #1;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 16) ||
          (!empty && head != q[0])) begin
        failures++; $display("FAIL at %0d size %0d", i, q.size());
      end
      if (full) n_full++;
      @(negedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
