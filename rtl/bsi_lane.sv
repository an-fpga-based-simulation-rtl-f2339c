// bsi_lane: pipelined synapse datapath of a processing element. For one synapse it
// evaluates the weight derivative of the adaptation rule
//     dW = -gamma * W + (X_K == 0 && X_L == 1 ? mu * (a_K - theta/2) : 0)
// (each product rounded toward minus infinity when scaled back)
// on the current substep value W(m), then applies one modified-midpoint step:
//     PASS_FIRST: W(1)   = W(0)   + h * dW
//     PASS_MID:   W(m+1) = W(m-1) + 2h * dW
//     PASS_LAST:  W      = (W(N) + W(N-1) + h * dW) / 2
// Timing: the two derivative products (gamma and mu terms) run in parallel in 4-cycle
// multipliers, the derivative is ready after 6 cycles, the step product and the sum
// take 6 more, so a result leaves 12 cycles after its inputs (t_MMID = 12 as in the
// document). One synapse per cycle, no stalls. Number formats (see see_pkg) and
// saturation to 16 bits are this design's choice. Decay and gain pass through.
module bsi_lane
  import see_pkg::*;
#(
  parameter int unsigned MUL_LAT = 4     // cycles of each multiplier
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  pass_e              pass,
  input  syn_t               syn_cur,    // synapse word of k(m)
  input  logic signed [15:0] w_prev,     // weight of k(m-1)
  input  logic               x_l,        // presynaptic neuron sending
  input  logic               x_k,        // postsynaptic neuron sending
  input  logic signed [31:0] a_cur,      // membrane potential of k(m)
  input  logic signed [31:0] theta,
  input  logic [15:0]        h,          // substep, unsigned, FRAC fraction bits
  output logic               out_valid,
  output syn_t               syn_out
);
  localparam int unsigned LAT = 2 * MUL_LAT + 4;   // 12

  typedef struct packed {
    logic               valid;
    pass_e              pass;
    syn_t               syn;
    logic signed [15:0] w_prev;
    logic               cond;
    logic [16:0]        hh;         // h or 2h
  } ctl_t;

  ctl_t ctl [LAT+1];

  // derivative multipliers, stage 0 .. MUL_LAT
  logic signed [24:0] pg [MUL_LAT];
  logic signed [40:0] pm [MUL_LAT];
  logic signed [15:0] t_g, t_m;        // stage MUL_LAT+1
  logic signed [15:0] dw;              // stage MUL_LAT+2 (6)
  logic signed [33:0] ps [MUL_LAT];    // step product stages 7..10
  logic signed [23:0] sum;             // stage 11
  syn_t               res;             // stage 12

  logic signed [31:0] diff;
  logic signed [47:0] neg_g, mu_t;
  assign diff  = a_cur - (theta >>> 1);
  assign neg_g = -48'(pg[MUL_LAT-1]);
  assign mu_t  = 48'(pm[MUL_LAT-1]);

  always_comb begin
    ctl[0].valid  = in_valid;
    ctl[0].pass   = pass;
    ctl[0].syn    = syn_cur;
    ctl[0].w_prev = w_prev;
    ctl[0].cond   = !x_k && x_l;
    ctl[0].hh     = (pass == PASS_MID) ? {h, 1'b0} : {1'b0, h};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= LAT; i++) ctl[i] <= '0;
    end else begin
      for (int i = 1; i <= LAT; i++) ctl[i] <= ctl[i-1];
    end
  end

  always_ff @(posedge clk) begin
    // gamma * W and mu * (a - theta/2), pipelined over MUL_LAT cycles
    pg[0] <= $signed({1'b0, syn_cur.gamma}) * syn_cur.weight;
    pm[0] <= $signed({1'b0, syn_cur.mu}) * diff;
    for (int i = 1; i < MUL_LAT; i++) begin
      pg[i] <= pg[i-1];
      pm[i] <= pm[i-1];
    end
    // stage 5: scale both terms back to FRAC bits
    t_g <= sat16(neg_g >>> 8);
    t_m <= ctl[MUL_LAT].cond ? sat16(mu_t >>> 8) : 16'sd0;
    // stage 6: derivative
    dw  <= sat16(48'(t_g) + 48'(t_m));
    // stages 7..10: (h or 2h) * dW
    ps[0] <= $signed({1'b0, ctl[2*MUL_LAT-2].hh}) * dw;
    for (int i = 1; i < MUL_LAT; i++) ps[i] <= ps[i-1];
    // stage 11: midpoint sum
    unique case (ctl[2*MUL_LAT+2].pass)
      PASS_FIRST: sum <= 24'(ctl[2*MUL_LAT+2].syn.weight) + 24'(ps[MUL_LAT-1] >>> FRAC);
      PASS_MID:   sum <= 24'(ctl[2*MUL_LAT+2].w_prev)     + 24'(ps[MUL_LAT-1] >>> FRAC);
      default:    sum <= 24'(ctl[2*MUL_LAT+2].syn.weight) + 24'(ctl[2*MUL_LAT+2].w_prev)
                         + 24'(ps[MUL_LAT-1] >>> FRAC);
    endcase
    // stage 12: halve for the final step, saturate, repack
    res.weight <= (ctl[2*MUL_LAT+3].pass == PASS_LAST) ? sat16(48'(sum >>> 1)) : sat16(48'(sum));
    res.gamma  <= ctl[2*MUL_LAT+3].syn.gamma;
    res.mu     <= ctl[2*MUL_LAT+3].syn.mu;
  end

  assign out_valid = ctl[LAT].valid;
  assign syn_out   = res;
endmodule
