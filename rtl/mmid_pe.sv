// mmid_pe: processing element of the neuron state computation. It integrates the
// state of one neuron (membrane potential a_K and all its presynaptic weights) over an
// interval H with the modified-midpoint method of N = 2(i+1) substeps, h = H / N:
//   k(1) = k(0) + h f(k(0));  k(m+1) = k(m-1) + 2h f(k(m));  y = (k(N) + k(N-1) + h f(k(N))) / 2
// where a_K' = i_K + sum of the weights of sending presynaptic neurons (eq. 1) and
// W' follows the adaptation rule (eq. 2, in bsi_lane). That is N+1 passes over the
// neuron information block (NIB). In each pass k(m) and k(m-1) are streamed in from
// two of the three memory channels while k(m+1) is written to the third; the roles
// rotate, so k(j) (j >= 1) lives in channel j mod 3 at address kbase[j mod 3], and
// k(0) is the NIB itself at nib_base in channel 0. The result y is left in channel
// res_ch at kbase[res_ch].
// NIB layout (64-bit words): word 0 = {i_K, a_K}, word 1 = {flags (bit 0 = X_K),
// theta}, words 2.. = two syn_t words each, synapse 2j in the low half. Two synapses
// are processed per cycle by two bsi_lane instances, as the 8-byte bus delivers.
// Memory channels: requests (one read and/or write per cycle per channel) and in-order
// read returns of any latency; returns are queued per channel and paired up.
// Timing per pass: NIB words + read latency + 12 (lane) + about 4 cycles, against the
// document's t_SDRAM + t_MMID + ceil(n/2). X_L of synapse s is asked for on syn_idx
// (s = syn_idx and syn_idx+1) and must be answered on xl_pair in the same cycle.
// The pass structure, the two synapses per access and the lane latency follow the
// document; NIB layout, number formats and the channel rotation are this design's.
module mmid_pe
  import see_pkg::*;
#(
  parameter int unsigned QDEPTH = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [MEM_AW-1:0]     nib_base,
  input  logic [15:0]           n_syn,
  input  logic [15:0]           h_int,       // H, unsigned, FRAC fraction bits
  input  logic [2:0]            seq_i,       // substep sequence index i
  input  logic [MEM_AW-1:0]     kbase [3],
  output logic                  busy,
  output logic                  done,
  output logic [1:0]            res_ch,
  output logic [15:0]           syn_idx,
  input  logic [1:0]            xl_pair,
  output mem_req_t              req [3],
  input  mem_rsp_t              rsp [3]
);
  localparam int unsigned QAW = $clog2(QDEPTH);

  typedef enum logic [1:0] {S_IDLE, S_PASS, S_HDR0, S_HDR1} state_e;
  state_e state;

  logic [MEM_AW-1:0] base_q;
  logic [15:0]       n_q, words, iss, rc, wc, h_q;
  logic [4:0]        m, n_sub;
  logic [1:0]        c_cur, c_prev, c_next;
  pass_e             pass;
  logic signed [31:0] a_cur, a_prev, i_k, theta, flags, acc, a_next;

  // ---------------------------------------------------------------- read queues
  logic [MEM_DW-1:0] q_cur_mem [QDEPTH], q_prv_mem [QDEPTH];
  logic [QAW:0]      q_cur_wp, q_cur_rp, q_prv_wp, q_prv_rp;
  logic              cur_has, prv_has, pop;
  logic [MEM_DW-1:0] d_cur, d_prv;

  assign cur_has = (q_cur_wp != q_cur_rp);
  assign prv_has = (q_prv_wp != q_prv_rp) || (pass == PASS_FIRST);
  assign d_cur   = q_cur_mem[q_cur_rp[QAW-1:0]];
  assign d_prv   = (pass == PASS_FIRST) ? '0 : q_prv_mem[q_prv_rp[QAW-1:0]];
  assign pop     = (state == S_PASS) && cur_has && prv_has && (rc < words);

  // ---------------------------------------------------------------- addresses
  logic [MEM_AW-1:0] cur_base, prv_base, nxt_base;
  logic              issue;
  assign cur_base = (m == 0) ? base_q : kbase[c_cur];
  assign prv_base = (m == 1) ? base_q : kbase[c_prev];
  assign nxt_base = kbase[c_next];
  // keep the number of reads in flight below the queue depth
  assign issue    = (state == S_PASS) && (iss < words) && ((iss - rc) < 16'(QDEPTH - 8));

  // ---------------------------------------------------------------- lanes
  logic [1:0]     lane_ov;
  syn_t           lane_out [2];
  logic           lane_in;
  logic [1:0]     syn_ok;
  assign lane_in = pop && (rc >= 16'(NIB_HDR));
  assign syn_idx = (rc - 16'(NIB_HDR)) << 1;
  assign syn_ok  = {(syn_idx + 16'd1) < n_q, syn_idx < n_q};

  for (genvar l = 0; l < 2; l++) begin : g_lane
    syn_t cur_s;
    assign cur_s = d_cur[32*l +: 32];
    bsi_lane u_lane (
      .clk, .rst_n, .in_valid(lane_in), .pass,
      .syn_cur(cur_s), .w_prev(d_prv[32*l+16 +: 16]),
      .x_l(xl_pair[l] && syn_ok[l]), .x_k(flags[0]),
      .a_cur, .theta, .h(h_q),
      .out_valid(lane_ov[l]), .syn_out(lane_out[l]));
  end

  // ---------------------------------------------------------------- potential step
  always_comb begin
    logic signed [31:0] da;
    logic signed [49:0] inc;
    logic [16:0]        hh;
    hh  = (pass == PASS_MID) ? {h_q, 1'b0} : {1'b0, h_q};
    da  = i_k + acc;
    inc = ($signed({1'b0, hh}) * da) >>> FRAC;
    unique case (pass)
      PASS_FIRST: a_next = a_cur  + 32'(inc);
      PASS_MID:   a_next = a_prev + 32'(inc);
      default:    a_next = 32'((34'(a_cur) + 34'(a_prev) + 34'(inc)) >>> 1);
    endcase
  end

  // ---------------------------------------------------------------- memory requests
  always_comb begin
    for (int c = 0; c < 3; c++) begin
      req[c] = '0;
      if (issue && c == int'(c_cur)) begin
        req[c].rd = 1'b1; req[c].addr = cur_base + MEM_AW'(iss);
      end
      if (issue && pass != PASS_FIRST && c == int'(c_prev)) begin
        req[c].rd = 1'b1; req[c].addr = prv_base + MEM_AW'(iss);
      end
      if (c == int'(c_next)) begin
        if (state == S_PASS && lane_ov[0]) begin
          req[c].wr = 1'b1; req[c].addr = nxt_base + MEM_AW'(NIB_HDR) + MEM_AW'(wc);
          req[c].wdata = {lane_out[1], lane_out[0]};
        end else if (state == S_HDR0) begin
          req[c].wr = 1'b1; req[c].addr = nxt_base;
          req[c].wdata = {i_k, a_next};
        end else if (state == S_HDR1) begin
          req[c].wr = 1'b1; req[c].addr = nxt_base + MEM_AW'(1);
          req[c].wdata = {flags, theta};
        end
      end
    end
  end

  // ---------------------------------------------------------------- queues
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cur_wp <= '0; q_cur_rp <= '0; q_prv_wp <= '0; q_prv_rp <= '0;
    end else begin
      if (state == S_IDLE) begin
        q_cur_wp <= '0; q_cur_rp <= '0; q_prv_wp <= '0; q_prv_rp <= '0;
      end else begin
        if (rsp[c_cur].valid)  q_cur_wp <= q_cur_wp + 1'b1;
        if (rsp[c_prev].valid && pass != PASS_FIRST) q_prv_wp <= q_prv_wp + 1'b1;
        if (pop) begin
          q_cur_rp <= q_cur_rp + 1'b1;
          if (pass != PASS_FIRST) q_prv_rp <= q_prv_rp + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rsp[c_cur].valid) q_cur_mem[q_cur_wp[QAW-1:0]] <= rsp[c_cur].rdata;
    if (rsp[c_prev].valid) q_prv_mem[q_prv_wp[QAW-1:0]] <= rsp[c_prev].rdata;
  end

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; res_ch <= '0;
      base_q <= '0; n_q <= '0; words <= '0; h_q <= '0; n_sub <= '0; m <= '0;
      c_cur <= '0; c_prev <= '0; c_next <= '0; pass <= PASS_FIRST;
      iss <= '0; rc <= '0; wc <= '0;
      a_cur <= '0; a_prev <= '0; i_k <= '0; theta <= '0; flags <= '0; acc <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          base_q <= nib_base;
          n_q    <= n_syn;
          words  <= 16'(NIB_HDR) + ((n_syn + 16'd1) >> 1);
          n_sub  <= 5'({seq_i, 1'b0}) + 5'd2;
          h_q    <= h_int / (16'({seq_i, 1'b0}) + 16'd2);
          m      <= '0;
          c_cur  <= 2'd0; c_prev <= 2'd2; c_next <= 2'd1;
          pass   <= PASS_FIRST;
          iss <= '0; rc <= '0; wc <= '0; acc <= '0;
          state  <= S_PASS;
        end
        S_PASS: begin
          if (issue) iss <= iss + 1'b1;
          if (pop) begin
            rc <= rc + 1'b1;
            if (rc == 16'd0) begin
              a_cur  <= d_cur[31:0];
              i_k    <= d_cur[63:32];
              a_prev <= d_prv[31:0];
            end else if (rc == 16'd1) begin
              theta <= d_cur[31:0];
              flags <= d_cur[63:32];
            end else begin
              acc <= acc
                + ((xl_pair[0] && syn_ok[0]) ? 32'(signed'(d_cur[31:16])) : 32'sd0)
                + ((xl_pair[1] && syn_ok[1]) ? 32'(signed'(d_cur[63:48])) : 32'sd0);
            end
          end
          if (lane_ov[0]) wc <= wc + 1'b1;
          if (rc == words && wc == words - 16'(NIB_HDR) && !lane_ov[0]) state <= S_HDR0;
        end
        S_HDR0: state <= S_HDR1;
        S_HDR1: begin
          if (m == n_sub) begin
            state  <= S_IDLE;
            done   <= 1'b1;
            res_ch <= c_next;
          end else begin
            m      <= m + 1'b1;
            c_prev <= c_cur;
            c_cur  <= c_next;
            c_next <= (c_next == 2'd2) ? 2'd0 : c_next + 2'd1;
            pass   <= (m + 5'd1 == n_sub) ? PASS_LAST : PASS_MID;
            iss <= '0; rc <= '0; wc <= '0; acc <= '0;
            state  <= S_PASS;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_no_q_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (q_cur_wp - q_cur_rp) <= (QAW+1)'(QDEPTH));
  a_lanes_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    lane_ov[1] == lane_ov[0]);
endmodule
