// ntc_top: network topology computation (NTC). It keeps two tag fields with one bit
// per neuron: the fire tag field (FTF) marks sending neurons, the excitation tag field
// (ETF) marks firing and excited neurons. In the topology-vector-phase it turns each
// excited neuron read from the dynamic event list (DEL) into a topology vector, the
// fire status of its presynaptic neurons, for the neuron state computation. In the
// topology-update-phase it applies fire-start and fire-stop events to the tags and
// lists, for the DEL, the postsynaptic neurons newly reached by a fire-start.
// Blocks: ntc_cntrl (sequencer), position_cntrl, tag2vec_nn, tag_cntrl, tag_set, two
// tag_field instances and the fire_start_buffer. FTF writes are also brought out
// (ftf_clear/ftf_we/ftf_waddr/ftf_wbit) so the NSC can mirror fire status for the
// full-connected scheme. Network shape: width x height grid, conn 4n/8n/fc,
// neurons numbered below n_input are input-layer neurons.
module ntc_top
  import see_pkg::*;
#(
  parameter int unsigned N_TAGS    = 1 << NEURON_W,
  parameter int unsigned BUF_DEPTH = 1 << NEURON_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] cfg_width,
  input  logic [15:0] cfg_height,
  input  conn_e       cfg_mode,
  input  neuron_t     cfg_n_input,
  input  logic        cmd_init,
  input  logic        cmd_vec,
  input  logic        cmd_upd,
  output logic        busy,
  output logic        done,
  input  logic        del_rd_valid,
  input  neuron_t     del_rd_neuron,
  input  logic        del_rd_last,
  output logic        del_rd_ready,
  input  logic        evt_valid,
  input  logic [1:0]  evt_kind,
  input  neuron_t     evt_neuron,
  output logic        evt_ready,
  output logic        del_wr_valid,
  output neuron_t     del_wr_neuron,
  input  logic        del_wr_ready,
  output logic        tv_valid,
  output topo_t       tv,
  input  logic        tv_ready,
  output logic        ftf_clear,
  output logic        ftf_we,
  output neuron_t     ftf_waddr,
  output logic        ftf_wbit,
  output logic [31:0] fire_cnt
);
  localparam int unsigned TAW = $clog2(N_TAGS);

  neuron_t        cur_neuron, n_neurons;
  neuron_t        nbr [NBR];
  logic [NBR-1:0] nbr_vld;
  logic [15:0]    row, col;
  logic           scan_start, scan_nn, scan_range, scan_done, scan_busy, scan_bit;
  logic [NBR-1:0] scan_vec;
  neuron_t        scan_addr, nn_neuron;
  logic           nn_valid, nn_ready;
  logic           tf_clear, ftf_busy, etf_busy;
  neuron_t        ftf_raddr, etf_raddr, etf_waddr;
  logic           ftf_rbit, etf_rbit, etf_we, etf_wbit;
  logic           tc_we, tc_bit, ts_we, ts_bit;
  neuron_t        tc_addr, ts_addr;
  logic           buf_push, buf_pop, buf_empty, buf_full;
  neuron_t        buf_din, buf_head;

  assign n_neurons = NEURON_W'(cfg_width * cfg_height);
  assign ftf_clear = tf_clear;

  position_cntrl u_pos (
    .neuron(cur_neuron), .width(cfg_width), .height(cfg_height), .mode(cfg_mode),
    .nbr, .nbr_vld, .row, .col);

  tag2vec_nn u_t2v (
    .clk, .rst_n, .start(scan_start), .nn_mode(scan_nn), .range_mode(scan_range),
    .range_n(n_neurons), .nbr, .nbr_vld, .busy(scan_busy),
    .tag_addr(scan_addr), .tag_bit(scan_bit), .done(scan_done), .vec(scan_vec),
    .out_valid(nn_valid), .out_neuron(nn_neuron), .out_ready(nn_ready));

  tag_cntrl u_tc (
    .tv_fire(tv_valid && tv_ready), .tv_neuron(tv.neuron), .tv_vec(tv.vec),
    .n_input(cfg_n_input), .etf_we(tc_we), .etf_addr(tc_addr), .etf_bit(tc_bit));

  tag_set u_ts (
    .clk, .rst_n, .nn_valid, .nn_neuron, .nn_ready,
    .del_valid(del_wr_valid), .del_neuron(del_wr_neuron), .del_ready(del_wr_ready),
    .etf_we(ts_we), .etf_addr(ts_addr), .etf_bit(ts_bit));

  tag_field #(.N_TAGS(N_TAGS)) u_ftf (
    .clk, .rst_n, .clear(tf_clear), .busy(ftf_busy),
    .raddr(ftf_raddr[TAW-1:0]), .rbit(ftf_rbit),
    .we(ftf_we), .waddr(ftf_waddr[TAW-1:0]), .wbit(ftf_wbit));

  tag_field #(.N_TAGS(N_TAGS)) u_etf (
    .clk, .rst_n, .clear(tf_clear), .busy(etf_busy),
    .raddr(etf_raddr[TAW-1:0]), .rbit(etf_rbit),
    .we(etf_we), .waddr(etf_waddr[TAW-1:0]), .wbit(etf_wbit));

  fire_start_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .push(buf_push), .din(buf_din), .pop(buf_pop),
    .head(buf_head), .empty(buf_empty), .full(buf_full));

  ntc_cntrl u_ctl (
    .clk, .rst_n, .mode(cfg_mode),
    .cmd_init, .cmd_vec, .cmd_upd, .busy, .done,
    .del_rd_valid, .del_rd_neuron, .del_rd_last, .del_rd_ready,
    .evt_valid, .evt_kind, .evt_neuron, .evt_ready,
    .tv_valid, .tv, .tv_ready, .cur_neuron,
    .scan_start, .scan_nn, .scan_range, .scan_done, .scan_vec, .scan_addr, .scan_bit,
    .tf_clear, .tf_busy(ftf_busy || etf_busy),
    .ftf_raddr, .ftf_rbit, .ftf_we, .ftf_waddr, .ftf_wbit,
    .etf_raddr, .etf_rbit, .etf_we, .etf_waddr, .etf_wbit,
    .tc_we, .tc_addr, .ts_we, .ts_addr,
    .buf_push, .buf_din, .buf_pop, .buf_head, .buf_empty, .buf_full, .fire_cnt);
  // Checks of the internal protocol: a neighbour scan starts only on an idle scanner
  // for a neuron inside the grid; tag_cntrl only clears and tag_set only sets ETF bits.
  a_scan_idle: assert property (@(posedge clk) disable iff (!rst_n)
    scan_start |-> !scan_busy);
  a_scan_in_grid: assert property (@(posedge clk) disable iff (!rst_n)
    (scan_start && !scan_range) |-> (row < cfg_height && col < cfg_width));
  a_etf_dir: assert property (@(posedge clk) disable iff (!rst_n)
    (tc_we |-> !tc_bit) and (ts_we |-> ts_bit));
endmodule
