// ntc_cntrl: sequencer of the network topology computation.
//  Vector phase (cmd_vec): excited neurons arrive from the DEL on del_rd_*; for each,
//    the neighbour list is scanned in the fire tag field (FTF), the topology vector is
//    offered to the NSC on tv_*, and tag_cntrl may clear the excitation tag. The
//    neuron flagged del_rd_last ends the phase (done pulse).
//  Update phase (cmd_upd): events arrive on evt_*. EVT_START sets the neuron's tags in
//    FTF and ETF in one cycle and stores the neuron in the fire-start buffer;
//    EVT_STOP clears its FTF tag; EVT_EXCITE sets only its ETF tag (external
//    stimulus); EVT_END closes the list. Then the buffered fire-start neurons are read
//    back and their neighbour lists are scanned in the ETF; non-excited neighbours go
//    to the DEL through tag_set. In the full-connected scheme one scan over all neurons
//    replaces the per-neuron scans. done pulses at the end.
// It also keeps the number of set fire tags, which gives the full-connected topology
// vector (bit 0 = some other neuron is sending). The two phases and the tag updates
// follow the document; handling the fire-stop events after, not alongside, the
// buffered fire-starts and the event encoding are this design's choices.
module ntc_cntrl
  import see_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  conn_e          mode,
  // commands from the control FPGA
  input  logic           cmd_init,
  input  logic           cmd_vec,
  input  logic           cmd_upd,
  output logic           busy,
  output logic           done,
  // DEL read stream (vector phase)
  input  logic           del_rd_valid,
  input  neuron_t        del_rd_neuron,
  input  logic           del_rd_last,
  output logic           del_rd_ready,
  // event stream (update phase)
  input  logic           evt_valid,
  input  logic [1:0]     evt_kind,
  input  neuron_t        evt_neuron,
  output logic           evt_ready,
  // topology vector to the NSC
  output logic           tv_valid,
  output topo_t          tv,
  input  logic           tv_ready,
  // current neuron for position control
  output neuron_t        cur_neuron,
  // scanner (tag2vec_nn)
  output logic           scan_start,
  output logic           scan_nn,
  output logic           scan_range,
  input  logic           scan_done,
  input  logic [NBR-1:0] scan_vec,
  input  neuron_t        scan_addr,
  output logic           scan_bit,
  // tag fields
  output logic           tf_clear,
  input  logic           tf_busy,
  output neuron_t        ftf_raddr,
  input  logic           ftf_rbit,
  output logic           ftf_we,
  output neuron_t        ftf_waddr,
  output logic           ftf_wbit,
  output neuron_t        etf_raddr,
  input  logic           etf_rbit,
  output logic           etf_we,
  output neuron_t        etf_waddr,
  output logic           etf_wbit,
  // tag_cntrl and tag_set write requests
  input  logic           tc_we,
  input  neuron_t        tc_addr,
  input  logic           ts_we,
  input  neuron_t        ts_addr,
  // fire-start buffer
  output logic           buf_push,
  output neuron_t        buf_din,
  output logic           buf_pop,
  input  neuron_t        buf_head,
  input  logic           buf_empty,
  input  logic           buf_full,
  // event counters for observation
  output logic [31:0]    fire_cnt
);
  localparam logic [1:0] EVT_START  = 2'd0;
  localparam logic [1:0] EVT_STOP   = 2'd1;
  localparam logic [1:0] EVT_EXCITE = 2'd2;
  localparam logic [1:0] EVT_END    = 2'd3;

  typedef enum logic [3:0] {
    S_IDLE, S_CLEAR, S_VEC_WAIT, S_VEC_START, S_VEC_SCAN, S_VEC_OUT,
    S_UPD, S_DRAIN, S_NN_START, S_NN_SCAN, S_FC_FLUSH, S_FC_START, S_FC_SCAN
  } state_e;

  state_e   state;
  logic     last_q, any_start;
  logic [NBR-1:0] vec_q;

  assign busy = (state != S_IDLE);

  // port muxing per state
  always_comb begin
    del_rd_ready = (state == S_VEC_WAIT);
    evt_ready    = (state == S_UPD) && !buf_full;
    tv_valid     = (state == S_VEC_OUT);
    tv.neuron    = cur_neuron;
    tv.vec       = vec_q;
    scan_start   = (state == S_VEC_START) || (state == S_NN_START) || (state == S_FC_START);
    scan_nn      = (state != S_VEC_START);
    scan_range   = (state == S_FC_START);
    tf_clear     = (state == S_IDLE) && cmd_init;
    ftf_raddr    = (state == S_UPD) ? evt_neuron : scan_addr;
    etf_raddr    = scan_addr;
    scan_bit     = (state == S_VEC_SCAN) ? ftf_rbit : etf_rbit;

    ftf_we = 1'b0; ftf_waddr = evt_neuron; ftf_wbit = 1'b0;
    etf_we = 1'b0; etf_waddr = evt_neuron; etf_wbit = 1'b1;
    buf_push = 1'b0; buf_din = evt_neuron;
    if (state == S_UPD && evt_valid && evt_ready) begin
      unique case (evt_kind)
        EVT_START:  begin ftf_we = 1'b1; ftf_wbit = 1'b1; etf_we = 1'b1; buf_push = 1'b1; end
        EVT_STOP:   begin ftf_we = 1'b1; ftf_wbit = 1'b0; end
        EVT_EXCITE: begin etf_we = 1'b1; end
        default: ;
      endcase
    end else if (tc_we) begin
      etf_we = 1'b1; etf_waddr = tc_addr; etf_wbit = 1'b0;
    end else if (ts_we) begin
      etf_we = 1'b1; etf_waddr = ts_addr; etf_wbit = 1'b1;
    end
    buf_pop = (state == S_DRAIN && !buf_empty) || (state == S_FC_FLUSH && !buf_empty);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; last_q <= 1'b0; any_start <= 1'b0;
      vec_q <= '0; cur_neuron <= '0; fire_cnt <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_init) begin state <= S_CLEAR; fire_cnt <= '0; end
          else if (cmd_vec) state <= S_VEC_WAIT;
          else if (cmd_upd) state <= S_UPD;
        end
        S_CLEAR: if (!tf_busy && !tf_clear) begin state <= S_IDLE; done <= 1'b1; end
        S_VEC_WAIT: if (del_rd_valid) begin
          cur_neuron <= del_rd_neuron;
          last_q     <= del_rd_last;
          state      <= S_VEC_START;
        end
        S_VEC_START: state <= S_VEC_SCAN;
        S_VEC_SCAN: if (scan_done) begin
          if (mode == CONN_FC)
            vec_q <= {{(NBR-1){1'b0}}, (fire_cnt - 32'(scan_vec[0])) != 0};
          else
            vec_q <= scan_vec;
          state <= S_VEC_OUT;
        end
        S_VEC_OUT: if (tv_ready) begin
          if (last_q) begin state <= S_IDLE; done <= 1'b1; end
          else state <= S_VEC_WAIT;
        end
        S_UPD: if (evt_valid && evt_ready) begin
          unique case (evt_kind)
            EVT_START: if (!ftf_rbit) fire_cnt <= fire_cnt + 1;
            EVT_STOP:  if (ftf_rbit)  fire_cnt <= fire_cnt - 1;
            EVT_END:   begin
              any_start <= !buf_empty;
              state     <= (mode == CONN_FC) ? S_FC_FLUSH : S_DRAIN;
            end
            default: ;
          endcase
        end
        S_DRAIN: begin
          if (buf_empty) begin state <= S_IDLE; done <= 1'b1; end
          else begin cur_neuron <= buf_head; state <= S_NN_START; end
        end
        S_NN_START: state <= S_NN_SCAN;
        S_NN_SCAN:  if (scan_done) state <= S_DRAIN;
        S_FC_FLUSH: if (buf_empty) begin
          if (any_start) state <= S_FC_START;
          else begin state <= S_IDLE; done <= 1'b1; end
        end
        S_FC_START: state <= S_FC_SCAN;
        S_FC_SCAN:  if (scan_done) begin state <= S_IDLE; done <= 1'b1; end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_tv_stable: assert property (@(posedge clk) disable iff (!rst_n)
    tv_valid && !tv_ready |=> tv_valid && $stable(tv));
endmodule
