// tag_set: takes the postsynaptic neuron numbers found by Tag2NN and writes them to the
// dynamic event list (DEL). Each accepted neuron is marked excited in the excitation
// tag field in the cycle it is accepted, so that a later fire-start reaching the same
// neuron finds its tag set and does not list it twice. A one-entry output register
// decouples the DEL port: nn_ready is high while the register is empty or being
// emptied; del_valid/del_neuron come from the register and are held until del_ready.
// The ETF update and the DEL write follow the document; the register stage is this
// design's choice.
module tag_set
  import see_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    nn_valid,
  input  neuron_t nn_neuron,
  output logic    nn_ready,
  output logic    del_valid,
  output neuron_t del_neuron,
  input  logic    del_ready,
  output logic    etf_we,
  output neuron_t etf_addr,
  output logic    etf_bit
);
  assign nn_ready = !del_valid || del_ready;
  assign etf_we   = nn_valid && nn_ready;
  assign etf_addr = nn_neuron;
  assign etf_bit  = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      del_valid  <= 1'b0;
      del_neuron <= '0;
    end else if (nn_ready) begin
      del_valid  <= nn_valid;
      if (nn_valid) del_neuron <= nn_neuron;
    end
  end
endmodule
