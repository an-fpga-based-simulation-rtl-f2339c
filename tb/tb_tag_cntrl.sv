// tb_tag_cntrl: exhaustive over handshake, zero/non-zero vector and input-layer
// membership; the ETF tag must be cleared only for an accepted zero vector of a
// neuron outside the input layer.
module tb_tag_cntrl;
  import see_pkg::*;
  logic tv_fire, etf_we, etf_bit;
  neuron_t tv_neuron, n_input, etf_addr;
  logic [NBR-1:0] tv_vec;
  int checks = 0, failures = 0;

  tag_cntrl dut (.tv_fire, .tv_neuron, .tv_vec, .n_input, .etf_we, .etf_addr, .etf_bit);

  initial begin
    for (int i = 0; i < 500; i++) begin
      bit exp_we;
      tv_fire   = 1'($urandom);
      tv_neuron = NEURON_W'($urandom_range(0, 200));
      n_input   = NEURON_W'($urandom_range(0, 100));
      tv_vec    = ($urandom_range(0, 1)) ? '0 : NBR'($urandom);
      #1;
      exp_we = tv_fire && tv_vec == 0 && tv_neuron >= n_input;
      checks++;
      if (etf_we != exp_we || (exp_we && (etf_addr != tv_neuron || etf_bit != 0))) begin
        failures++; $display("FAIL %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
