// fire_start_buffer: first-in first-out store for the neurons that produced a
// fire-start event in the current topology-update-phase. The NTC writes each such
// neuron here while it sets its fire and excitation tags, and reads them back after
// the fire-stop events to resolve their postsynaptic neurons. It stands in for the
// external SDRAM and its controller; an on-chip array of DEPTH entries (one per neuron,
// since a neuron starts firing at most once per event time) is this design's choice.
// push and pop act on the clock edge; head is the oldest entry whenever !empty.
module fire_start_buffer
  import see_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << 19
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  neuron_t din,
  input  logic    pop,
  output neuron_t head,
  output logic    empty,
  output logic    full
);
  localparam int unsigned AW = $clog2(DEPTH);
  neuron_t mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign head  = mem[rptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; count <= '0;
    end else begin
      if (push && !full) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (pop && !empty) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop && !empty);
    end
  end

  always_ff @(posedge clk) if (push && !full) mem[wptr] <= din;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
