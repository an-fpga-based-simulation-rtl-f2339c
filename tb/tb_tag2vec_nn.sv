// tb_tag2vec_nn: drives random neighbour lists against a random tag array. VEC mode
// must return the tags of the valid slots as a vector after one cycle per slot; NN
// mode must emit, in slot order, exactly the valid slots whose tag is zero, holding
// each while out_ready is low; range mode must emit every untagged neuron below
// range_n.
module tb_tag2vec_nn;
  import see_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, nn_mode, range_mode, busy, tag_bit, done, out_valid, out_ready;
  neuron_t range_n, tag_addr, out_neuron;
  neuron_t nbr [NBR];
  logic [NBR-1:0] nbr_vld, vec;
  bit tags [64];
  neuron_t got[$];
  int checks = 0, failures = 0, stalls = 0;

  tag2vec_nn dut (.*);
  assign tag_bit = tags[tag_addr[5:0]];

  always @(posedge clk) if (out_valid) begin
    if (out_ready) got.push_back(out_neuron); else stalls++;
  end
  always @(negedge clk) out_ready <= ($urandom_range(0, 2) != 0);

  task automatic run(bit nn, bit rng);
    neuron_t exp[$];
    logic [NBR-1:0] ev;
    int cyc;
    foreach (tags[i]) tags[i] = 1'($urandom);
    for (int s = 0; s < NBR; s++) begin
      nbr[s] = NEURON_W'($urandom_range(0, 63));
      nbr_vld[s] = 1'($urandom);
    end
    range_n = NEURON_W'($urandom_range(1, 64));
    ev = '0;
    if (rng) begin
      for (int k = 0; k < int'(range_n); k++) if (!tags[k]) exp.push_back(NEURON_W'(k));
    end else
      for (int s = 0; s < NBR; s++) begin
        ev[s] = nbr_vld[s] && tags[nbr[s]];
        if (nbr_vld[s] && !tags[nbr[s]]) exp.push_back(nbr[s]);
      end
    got.delete();
    nn_mode = nn; range_mode = rng; start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    if (!nn) begin
      checks++;
      if (vec != ev || cyc != NBR) begin
        failures++; $display("FAIL vec %b exp %b cycles %0d", vec, ev, cyc);
      end
    end else begin
      checks++;
      if (got != exp) begin failures++; $display("FAIL nn list size %0d exp %0d", got.size(), exp.size()); end
    end
  endtask

  initial begin
    start = 0; nn_mode = 0; range_mode = 0; range_n = '0; out_ready = 1;
    foreach (nbr[s]) nbr[s] = '0;
    nbr_vld = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) run(0, 0);
    for (int i = 0; i < 100; i++) run(1, 0);
    for (int i = 0; i < 30; i++) run(1, 1);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
