// tvu: topology vector unit. It accepts topology vectors from the NTC and starts the
// processing element that owns the neuron's information block (NIB). Sparse
// configuration: neuron K belongs to PE (K mod N_PE), whose own SDRAM channel holds
// its NIB at ((K div N_PE) * stride). Full-connected configuration: the three PEs are
// merged into PE 0, which uses all three channels; the NIB of neuron K is at K*stride.
// A vector waits (tv_ready low) while its PE is busy, so vectors are handed out in
// order. The vector is latched per PE for the X_L lookups during the integration; when
// a PE finishes, res_valid pulses for it with the neuron number and the channel that
// holds the result. The distribution task follows the document; the static neuron-to-
// PE mapping and in-order hand-out are this design's choice.
module tvu
  import see_pkg::*;
#(
  parameter int unsigned N_PE = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_fc,
  input  logic [15:0]       cfg_stride,
  input  logic              tv_valid,
  input  topo_t             tv,
  output logic              tv_ready,
  output logic              pe_start [N_PE],
  output logic [MEM_AW-1:0] pe_base,
  output logic [NBR-1:0]    pe_vec   [N_PE],
  input  logic              pe_busy  [N_PE],
  input  logic              pe_done  [N_PE],
  input  logic [1:0]        pe_res_ch [N_PE],
  output logic              res_valid  [N_PE],
  output neuron_t           res_neuron [N_PE],
  output logic [1:0]        res_ch     [N_PE],
  output logic [31:0]       dispatched [N_PE]
);
  localparam int unsigned PW = (N_PE > 1) ? $clog2(N_PE) : 1;
  logic [PW-1:0] target;
  neuron_t       slot;
  logic          started [N_PE];   // start issued last cycle, busy not yet visible
  neuron_t       owner [N_PE];

  always_comb begin
    if (cfg_fc) begin
      target = '0;
      slot   = tv.neuron;
    end else begin
      target = PW'(tv.neuron % NEURON_W'(N_PE));
      slot   = tv.neuron / NEURON_W'(N_PE);
    end
    pe_base  = MEM_AW'(slot) * MEM_AW'(cfg_stride);
    tv_ready = !pe_busy[target] && !started[target];
    for (int p = 0; p < N_PE; p++) begin
      pe_start[p]   = tv_valid && tv_ready && (int'(target) == p);
      res_valid[p]  = pe_done[p];
      res_neuron[p] = owner[p];
      res_ch[p]     = pe_res_ch[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PE; p++) begin
        started[p] <= 1'b0; owner[p] <= '0; pe_vec[p] <= '0; dispatched[p] <= '0;
      end
    end else begin
      for (int p = 0; p < N_PE; p++) begin
        started[p] <= pe_start[p];
        if (pe_start[p]) begin
          owner[p]      <= tv.neuron;
          pe_vec[p]     <= tv.vec;
          dispatched[p] <= dispatched[p] + 1;
        end
      end
    end
  end
endmodule
