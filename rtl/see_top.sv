// see_top: the spiking neural network emulation engine without its control processors.
// The network topology computation (ntc_top) and the neuron state computation
// (nsc_top) are joined as on the board: topology vectors flow from the NTC to the
// NSC's topology vector unit, and every write to the fire tag field is mirrored into
// the NSC's fire-status map (used in the full-connected configuration). Everything
// the control FPGA with its two embedded processors would drive is a port: commands,
// network configuration, the dynamic event list (read in the vector phase, written in
// the update phase), the fire-start/fire-stop event stream, the integration settings
// and the results. The three SDRAM channels of the NSC are ports too (64-bit words,
// in-order reads of any latency). The software side, the event lists and the
// polynomial-extrapolation step are outside this RTL.
module see_top
  import see_pkg::*;
#(
  parameter int unsigned N_TAGS     = 1 << NEURON_W,
  parameter int unsigned BUF_DEPTH  = 1 << NEURON_W,
  parameter int unsigned KBUF_WORDS = 2048,
  parameter int unsigned N_PE       = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // network configuration
  input  logic [15:0]       cfg_width,
  input  logic [15:0]       cfg_height,
  input  conn_e             cfg_mode,
  input  neuron_t           cfg_n_input,
  // NTC commands
  input  logic              cmd_init,
  input  logic              cmd_vec,
  input  logic              cmd_upd,
  output logic              ntc_busy,
  output logic              ntc_done,
  // dynamic event list, read side
  input  logic              del_rd_valid,
  input  neuron_t           del_rd_neuron,
  input  logic              del_rd_last,
  output logic              del_rd_ready,
  // fire-start / fire-stop / excite / end events
  input  logic              evt_valid,
  input  logic [1:0]        evt_kind,
  input  neuron_t           evt_neuron,
  output logic              evt_ready,
  // dynamic event list, write side
  output logic              del_wr_valid,
  output neuron_t           del_wr_neuron,
  input  logic              del_wr_ready,
  output logic [31:0]       fire_cnt,
  // integration settings
  input  logic [15:0]       cfg_stride,
  input  logic [15:0]       cfg_n_syn,
  input  logic [15:0]       cfg_h,
  input  logic [2:0]        cfg_seq_i,
  input  logic [MEM_AW-1:0] cfg_kbase,
  // results
  output logic              res_valid  [N_PE],
  output neuron_t           res_neuron [N_PE],
  output logic [1:0]        res_ch     [N_PE],
  output logic              pe_busy    [N_PE],
  output logic [31:0]       dispatched [N_PE],
  // SDRAM channels
  output mem_req_t          sdram_req  [N_PE],
  input  mem_rsp_t          sdram_rsp  [N_PE]
);
  logic    tv_valid, tv_ready, ftf_clear, ftf_we, ftf_wbit;
  topo_t   tv;
  neuron_t ftf_waddr;

  ntc_top #(.N_TAGS(N_TAGS), .BUF_DEPTH(BUF_DEPTH)) u_ntc (
    .clk, .rst_n, .cfg_width, .cfg_height, .cfg_mode, .cfg_n_input,
    .cmd_init, .cmd_vec, .cmd_upd, .busy(ntc_busy), .done(ntc_done),
    .del_rd_valid, .del_rd_neuron, .del_rd_last, .del_rd_ready,
    .evt_valid, .evt_kind, .evt_neuron, .evt_ready,
    .del_wr_valid, .del_wr_neuron, .del_wr_ready,
    .tv_valid, .tv, .tv_ready, .ftf_clear, .ftf_we, .ftf_waddr, .ftf_wbit, .fire_cnt);

  nsc_top #(.N_PE(N_PE), .KBUF_WORDS(KBUF_WORDS), .N_FIRE(N_TAGS)) u_nsc (
    .clk, .rst_n, .cfg_fc(cfg_mode == CONN_FC), .cfg_stride, .cfg_n_syn, .cfg_h,
    .cfg_seq_i, .cfg_kbase, .tv_valid, .tv, .tv_ready,
    .fm_clear(ftf_clear), .fm_we(ftf_we), .fm_neuron(ftf_waddr), .fm_bit(ftf_wbit),
    .res_valid, .res_neuron, .res_ch, .pe_busy, .dispatched, .sdram_req, .sdram_rsp);
endmodule
