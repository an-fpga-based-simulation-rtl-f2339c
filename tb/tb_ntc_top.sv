// tb_ntc_top: runs the network topology computation on a small grid through several
// rounds of topology-update-phase and topology-vector-phase in the 4n, 8n and
// full-connected schemes, with random fire-start/fire-stop events and randomly
// stalling DEL and NSC ports. A bit-array model of both tag fields predicts the exact
// sequence of neurons written to the DEL and of topology vectors; the ETF tags are
// compared after every phase. Counts that the ETF clear, the DEL write and the stalls
// all happened.
module tb_ntc_top;
  import see_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 6, H = 5, N = W * H, NT = 64;
  logic [15:0] cfg_width = W, cfg_height = H;
  conn_e   cfg_mode;
  neuron_t cfg_n_input = 3;
  logic cmd_init, cmd_vec, cmd_upd, busy, done;
  logic del_rd_valid, del_rd_last, del_rd_ready;
  neuron_t del_rd_neuron, evt_neuron, del_wr_neuron, ftf_waddr;
  logic evt_valid, evt_ready, del_wr_valid, del_wr_ready, tv_valid, tv_ready;
  logic [1:0] evt_kind;
  topo_t tv;
  logic ftf_clear, ftf_we, ftf_wbit;
  logic [31:0] fire_cnt;

  ntc_top #(.N_TAGS(NT), .BUF_DEPTH(32)) dut (.*);

  bit ftf [N], etf [N];
  int checks = 0, failures = 0;
  int n_clear = 0, n_delwr = 0, n_tv_stall = 0, n_del_stall = 0;
  neuron_t exp_del[$];
  topo_t   exp_tv[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic void nbrs(int k, conn_e m, output int list[$]);
    int r = k / W, c = k % W;
    int dr [8] = '{-1, 0, 1, 0, -1, 1, 1, -1};
    int dc [8] = '{ 0, 1, 0, -1, 1, 1, -1, -1};
    list.delete();
    for (int s = 0; s < ((m == CONN_4N) ? 4 : 8); s++) begin
      int rr = r + dr[s], cc = c + dc[s];
      if (rr >= 0 && rr < H && cc >= 0 && cc < W) list.push_back(rr * W + cc);
      else list.push_back(-1);
    end
  endfunction

  // random stalls on the output ports
  always @(negedge clk) begin
    del_wr_ready <= ($urandom_range(0, 3) != 0);
    tv_ready     <= ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (del_wr_valid && !del_wr_ready) n_del_stall++;
    if (tv_valid && !tv_ready) n_tv_stall++;
    if (del_wr_valid && del_wr_ready) begin
      n_delwr++;
      check(exp_del.size() > 0 && del_wr_neuron == exp_del[0],
            $sformatf("DEL write %0d", del_wr_neuron));
      if (exp_del.size() > 0) void'(exp_del.pop_front());
    end
    if (tv_valid && tv_ready) begin
      check(exp_tv.size() > 0 && tv == exp_tv[0],
            $sformatf("vector %0d/%b", tv.neuron, tv.vec));
      if (exp_tv.size() > 0) void'(exp_tv.pop_front());
    end
  end

  task automatic wait_done();
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic send_evt(logic [1:0] kind, int k);
    evt_valid = 1; evt_kind = kind; evt_neuron = NEURON_W'(k);
    #1;
    while (!evt_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    evt_valid = 0;
  endtask

  task automatic update_phase(conn_e m);
    int starts[$], stops[$], l[$];
    bit any;
    for (int k = 0; k < N; k++) begin
      if (!ftf[k] && $urandom_range(0, 5) == 0) starts.push_back(k);
      else if (ftf[k] && $urandom_range(0, 1) == 0) stops.push_back(k);
    end
    // model: starts set both tags, stops clear FTF, then postsynaptic resolution
    foreach (starts[i]) begin ftf[starts[i]] = 1; etf[starts[i]] = 1; end
    foreach (stops[i]) ftf[stops[i]] = 0;
    if (m == CONN_FC) begin
      if (starts.size() > 0)
        for (int k = 0; k < N; k++) if (!etf[k]) begin etf[k] = 1; exp_del.push_back(k); end
    end else begin
      foreach (starts[i]) begin
        nbrs(starts[i], m, l);
        foreach (l[s]) if (l[s] >= 0 && !etf[l[s]]) begin
          etf[l[s]] = 1; exp_del.push_back(NEURON_W'(l[s]));
        end
      end
    end
    cmd_upd = 1; @(negedge clk); cmd_upd = 0;
    foreach (starts[i]) send_evt(2'd0, starts[i]);
    foreach (stops[i])  send_evt(2'd1, stops[i]);
    send_evt(2'd3, 0);
    wait_done();
    check(exp_del.size() == 0, "all DEL writes seen");
  endtask

  task automatic vector_phase(conn_e m);
    int list[$], l[$];
    for (int k = 0; k < N; k++) if (etf[k]) list.push_back(k);
    if (list.size() == 0) return;
    foreach (list[i]) begin
      topo_t t;
      int cnt;
      t.neuron = NEURON_W'(list[i]);
      t.vec = '0;
      if (m == CONN_FC) begin
        cnt = 0;
        for (int k = 0; k < N; k++) if (ftf[k] && k != list[i]) cnt++;
        t.vec[0] = (cnt != 0);
      end else begin
        nbrs(list[i], m, l);
        foreach (l[s]) if (l[s] >= 0) t.vec[s] = ftf[l[s]];
      end
      exp_tv.push_back(t);
    end
    cmd_vec = 1; @(negedge clk); cmd_vec = 0;
    foreach (list[i]) begin
      del_rd_valid = 1; del_rd_neuron = NEURON_W'(list[i]); del_rd_last = (i == list.size() - 1);
      #1;
      while (!del_rd_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      del_rd_valid = 0;
    end
    wait_done();
    check(exp_tv.size() == 0, "all vectors seen");
    // tag control: zero vector outside the input layer clears the ETF tag
    foreach (list[i]) begin
      nbrs(list[i], m, l);
      if (m == CONN_FC) begin
        int cnt = 0;
        for (int k = 0; k < N; k++) if (ftf[k] && k != list[i]) cnt++;
        if (cnt == 0 && list[i] >= 3) begin etf[list[i]] = 0; n_clear++; end
      end else begin
        bit z = 1;
        foreach (l[s]) if (l[s] >= 0 && ftf[l[s]]) z = 0;
        if (z && list[i] >= 3) begin etf[list[i]] = 0; n_clear++; end
      end
    end
  endtask

  task automatic compare_tags();
    bit ok = 1;
    for (int k = 0; k < N; k++)
      if (dut.u_etf.mem[k / 32][k % 32] != etf[k] || dut.u_ftf.mem[k / 32][k % 32] != ftf[k]) ok = 0;
    check(ok, "tag fields match model");
  endtask

  initial begin
    cmd_init = 0; cmd_vec = 0; cmd_upd = 0; del_rd_valid = 0; del_rd_last = 0;
    del_rd_neuron = '0; evt_valid = 0; evt_kind = '0; evt_neuron = '0;
    cfg_mode = CONN_4N;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int mi = 0; mi < 3; mi++) begin
      cfg_mode = conn_e'(mi);
      foreach (ftf[k]) begin ftf[k] = 0; etf[k] = 0; end
      cmd_init = 1; @(negedge clk); cmd_init = 0;
      wait_done();
      // input layer receives external stimulus
      cmd_upd = 1; @(negedge clk); cmd_upd = 0;
      for (int k = 0; k < 3; k++) begin send_evt(2'd2, k); etf[k] = 1; end
      send_evt(2'd3, 0);
      wait_done();
      for (int round = 0; round < 6; round++) begin
        update_phase(conn_e'(mi));
        compare_tags();
        vector_phase(conn_e'(mi));
        compare_tags();
      end
      begin
        int nf;
        nf = 0;
        foreach (ftf[k]) nf += ftf[k];
        check(fire_cnt == 32'(nf), $sformatf("fire count %0d exp %0d", fire_cnt, nf));
      end
    end
    check(n_clear > 0, "ETF clear happened");
    check(n_delwr > 0, "DEL writes happened");
    check(n_tv_stall > 0 && n_del_stall > 0, "stalls happened");
    $display("etf clears %0d, DEL writes %0d, stalls tv %0d del %0d",
             n_clear, n_delwr, n_tv_stall, n_del_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
