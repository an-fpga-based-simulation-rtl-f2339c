// tb_tag_set: streams neuron numbers through with a randomly stalling DEL port;
// every neuron must reach the DEL once and in order, and the ETF must be set exactly
// when a neuron is accepted.
module tb_tag_set;
  import see_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic nn_valid, nn_ready, del_valid, del_ready, etf_we, etf_bit;
  neuron_t nn_neuron, del_neuron, etf_addr;
  neuron_t sent[$];
  int checks = 0, failures = 0, got = 0;

  tag_set dut (.clk, .rst_n, .nn_valid, .nn_neuron, .nn_ready, .del_valid, .del_neuron,
               .del_ready, .etf_we, .etf_addr, .etf_bit);

  initial begin
    int n = 0;
    bit acc;
    nn_valid = 0; nn_neuron = '0; del_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      if (!nn_valid || nn_ready) begin
        nn_valid  = ($urandom_range(0, 2) != 0) && n < 500;
        nn_neuron = NEURON_W'(n * 7 + 3);
      end
      del_ready = ($urandom_range(0, 2) != 0);
      #1;
      acc = nn_valid && nn_ready;
      checks++;
      if (etf_we != (nn_valid && nn_ready) || (etf_we && (etf_addr != nn_neuron || !etf_bit))) begin
        failures++; $display("FAIL etf at %0d", i);
      end
      if (del_valid && del_ready) begin
        checks++;
        if (sent.size() == 0 || del_neuron != sent[0]) begin
          failures++; $display("FAIL del order got %0d exp %0d size %0d", del_neuron, sent.size() ? sent[0] : 0, sent.size());
        end else void'(sent.pop_front());
        got++;
      end
      @(negedge clk);
      if (acc) begin sent.push_back(nn_neuron); n++; nn_valid = 0; end
    end
    checks++;
    if (got != n || n == 0) begin failures++; $display("FAIL got %0d sent %0d", got, n); end
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
