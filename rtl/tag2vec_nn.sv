// tag2vec_nn: walks a list of connected neurons and reads one tag bit per cycle.
//  VEC mode (topology-vector-phase): bit s of the topology vector is the fire tag of
//    list slot s, zero for invalid slots. done pulses with the finished vector.
//  NN mode (topology-update-phase): every valid slot whose excitation tag reads zero is
//    emitted as a neuron number on out_valid/out_neuron, held until out_ready; these are
//    the postsynaptic neurons that a fire-start reaches and that are not yet excited.
// In range mode the list is replaced by the neuron numbers 0 .. range_n-1 (used for the
// full-connected scheme, where every neuron is postsynaptic). start is accepted while
// idle; the list inputs must stay stable until done. One slot per cycle, plus stalls
// on out_ready. The document names the Tag2Vec and Tag2NN functions; the sequential
// one-bit-per-cycle reading is this design's choice.
module tag2vec_nn
  import see_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           nn_mode,
  input  logic           range_mode,
  input  neuron_t        range_n,
  input  neuron_t        nbr     [NBR],
  input  logic [NBR-1:0] nbr_vld,
  output logic           busy,
  // tag field read port
  output neuron_t        tag_addr,
  input  logic           tag_bit,
  // results
  output logic           done,
  output logic [NBR-1:0] vec,
  output logic           out_valid,
  output neuron_t        out_neuron,
  input  logic           out_ready
);
  logic [NEURON_W:0] idx;
  logic              mode_nn, mode_rng;
  logic              slot_vld, last;
  logic [NBR-1:0]    vec_q;

  always_comb begin
    if (mode_rng) begin
      tag_addr = idx[NEURON_W-1:0];
      slot_vld = 1'b1;
      last     = (idx + 1 >= {1'b0, range_n});
    end else begin
      tag_addr = nbr[idx[2:0]];
      slot_vld = nbr_vld[idx[2:0]];
      last     = (idx == (NEURON_W+1)'(NBR - 1));
    end
    out_valid  = busy && mode_nn && slot_vld && !tag_bit;
    out_neuron = tag_addr;
  end

  logic advance;
  assign advance = busy && !(out_valid && !out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; idx <= '0; mode_nn <= 1'b0; mode_rng <= 1'b0;
      vec_q <= '0; done <= 1'b0; vec <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= !(range_mode && range_n == 0);
        done     <=  (range_mode && range_n == 0);
        idx      <= '0;
        mode_nn  <= nn_mode;
        mode_rng <= range_mode;
        vec_q    <= '0;
      end else if (advance) begin
        if (!mode_rng && !mode_nn) vec_q[idx[2:0]] <= slot_vld && tag_bit;
        idx <= idx + 1'b1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
          vec  <= vec_q;
          if (!mode_rng && !mode_nn) vec[idx[2:0]] <= slot_vld && tag_bit;
        end
      end
    end
  end
endmodule
