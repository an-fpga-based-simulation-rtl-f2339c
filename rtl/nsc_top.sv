// nsc_top: neuron state computation (NSC). A topology vector unit (tvu) hands each
// topology vector from the NTC to one of N_PE processing elements (mmid_pe), which
// integrates that neuron's membrane potential and presynaptic weights by the
// modified-midpoint method. The unit is reconfigurable (cfg_fc):
//  sparse (cfg_fc = 0): each PE has its own SDRAM channel holding its neurons' NIBs;
//    the two other channels of the PE are on-chip kbuf_bram buffers for the
//    intermediate values. X_L of synapse s is bit s of the neuron's topology vector
//    (the synapses of a NIB are stored in neighbour-slot order).
//  full-connected (cfg_fc = 1): PE 0 alone uses all three SDRAM channels, reading
//    k(m) and k(m-1) in parallel and writing k(m+1) on the third. Synapse s is the
//    connection from neuron s; its X_L comes from a fire-status map that mirrors the
//    NTC's fire tag field (fm_we/fm_neuron/fm_bit, and fm_clear with the tag fields).
// Integration settings (cfg_h = H, cfg_seq_i = i, cfg_n_syn, NIB stride, k-buffer
// region cfg_kbase in SDRAM) come from the control processor. res_* pulses per PE when
// a neuron is done. The structure (TVU, three PEs with one SDRAM each, merge into one
// PE over three channels) follows the document; mappings are this design's choice.
module nsc_top
  import see_pkg::*;
#(
  parameter int unsigned N_PE       = 3,
  parameter int unsigned KBUF_WORDS = 2048,
  parameter int unsigned N_FIRE     = 1 << NEURON_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_fc,
  input  logic [15:0]       cfg_stride,
  input  logic [15:0]       cfg_n_syn,
  input  logic [15:0]       cfg_h,
  input  logic [2:0]        cfg_seq_i,
  input  logic [MEM_AW-1:0] cfg_kbase,
  input  logic              tv_valid,
  input  topo_t             tv,
  output logic              tv_ready,
  input  logic              fm_clear,
  input  logic              fm_we,
  input  neuron_t           fm_neuron,
  input  logic              fm_bit,
  output logic              res_valid  [N_PE],
  output neuron_t           res_neuron [N_PE],
  output logic [1:0]        res_ch     [N_PE],
  output logic              pe_busy    [N_PE],
  output logic [31:0]       dispatched [N_PE],
  output mem_req_t          sdram_req  [N_PE],
  input  mem_rsp_t          sdram_rsp  [N_PE]
);
  localparam int unsigned FW = $clog2(N_FIRE);

  logic              pe_start  [N_PE];
  logic              pe_done   [N_PE];
  logic [1:0]        pe_res_ch [N_PE];
  logic [NBR-1:0]    pe_vec    [N_PE];
  logic [MEM_AW-1:0] pe_base;
  logic [15:0]       syn_idx   [N_PE];
  logic [1:0]        xl_pair   [N_PE];
  mem_req_t          pe_req    [N_PE][3];
  mem_rsp_t          pe_rsp    [N_PE][3];
  mem_req_t          kb_req    [N_PE][2];
  mem_rsp_t          kb_rsp    [N_PE][2];
  logic [MEM_AW-1:0] kbase_sp [3], kbase_fc [3];

  // fire-status mirror for the full-connected configuration: two copies of the
  // map, so that the X_L of two synapses can be read in one cycle
  logic [FW-1:0] fm_ra [2];
  logic          fm_rb [2];
  for (genvar r = 0; r < 2; r++) begin : g_fm
    tag_field #(.N_TAGS(N_FIRE)) u_map (
      .clk, .rst_n, .clear(fm_clear), .busy(), .raddr(fm_ra[r]), .rbit(fm_rb[r]),
      .we(fm_we), .waddr(fm_neuron[FW-1:0]), .wbit(fm_bit));
  end

  // only PE 0 reads the map (full-connected configuration)
  assign fm_ra[0] = FW'(syn_idx[0]);
  assign fm_ra[1] = FW'(syn_idx[0] + 16'd1);

  assign kbase_sp = '{cfg_kbase, '0, '0};
  assign kbase_fc = '{cfg_kbase, cfg_kbase, cfg_kbase};

  tvu #(.N_PE(N_PE)) u_tvu (
    .clk, .rst_n, .cfg_fc, .cfg_stride, .tv_valid, .tv, .tv_ready,
    .pe_start, .pe_base, .pe_vec, .pe_busy, .pe_done, .pe_res_ch,
    .res_valid, .res_neuron, .res_ch, .dispatched);

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    // X_L lookup
    always_comb begin
      logic [15:0] s1;
      s1 = syn_idx[p] + 16'd1;
      if (cfg_fc)
        xl_pair[p] = {fm_rb[1], fm_rb[0]};
      else
        xl_pair[p] = {(s1 < 16'(NBR)) ? pe_vec[p][s1[2:0]] : 1'b0,
                      (syn_idx[p] < 16'(NBR)) ? pe_vec[p][syn_idx[p][2:0]] : 1'b0};
    end

    logic [MEM_AW-1:0] kbase [3];
    assign kbase = (cfg_fc && p == 0) ? kbase_fc : kbase_sp;

    mmid_pe u_pe (
      .clk, .rst_n, .start(pe_start[p]), .nib_base(pe_base), .n_syn(cfg_n_syn),
      .h_int(cfg_h), .seq_i(cfg_seq_i),
      .kbase,
      .busy(pe_busy[p]), .done(pe_done[p]), .res_ch(pe_res_ch[p]),
      .syn_idx(syn_idx[p]), .xl_pair(xl_pair[p]),
      .req(pe_req[p]), .rsp(pe_rsp[p]));

    for (genvar b = 0; b < 2; b++) begin : g_kb
      kbuf_bram #(.WORDS(KBUF_WORDS)) u_kb (
        .clk, .rst_n, .req(kb_req[p][b]), .rsp(kb_rsp[p][b]));
    end

    // channel routing
    always_comb begin
      kb_req[p][0] = '0;
      kb_req[p][1] = '0;
      sdram_req[p] = '0;
      pe_rsp[p][0] = '0; pe_rsp[p][1] = '0; pe_rsp[p][2] = '0;
      if (cfg_fc) begin
        if (p == 0) begin
          for (int c = 0; c < 3; c++) pe_rsp[p][c] = sdram_rsp[c];
        end
        sdram_req[p] = pe_req[0][p];
      end else begin
        sdram_req[p]  = pe_req[p][0];
        pe_rsp[p][0]  = sdram_rsp[p];
        kb_req[p][0]  = pe_req[p][1];
        pe_rsp[p][1]  = kb_rsp[p][0];
        kb_req[p][1]  = pe_req[p][2];
        pe_rsp[p][2]  = kb_rsp[p][1];
      end
    end
  end

  initial assert (N_PE == 3) else $error("the full-connected merge maps PE 0 onto three channels");
endmodule
