// tag_cntrl: watches each topology vector sent to the NSC. When the vector is zero
// (no connected neuron is sending) and the neuron does not belong to the input layer,
// the neuron is no longer excited and its excitation tag is cleared (etf_we with
// etf_bit = 0) in the same cycle as the vector is handed over. Input-layer neurons
// receive an external stimulus and stay excited. The rule follows the document; taking
// the neurons numbered below n_input as the input layer is this design's choice.
module tag_cntrl
  import see_pkg::*;
(
  input  logic           tv_fire,     // topology vector accepted by the NSC
  input  neuron_t        tv_neuron,
  input  logic [NBR-1:0] tv_vec,
  input  neuron_t        n_input,
  output logic           etf_we,
  output neuron_t        etf_addr,
  output logic           etf_bit
);
  always_comb begin
    etf_we   = tv_fire && (tv_vec == '0) && (tv_neuron >= n_input);
    etf_addr = tv_neuron;
    etf_bit  = 1'b0;
  end
endmodule
