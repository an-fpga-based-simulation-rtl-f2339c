// tb_see_workload: runs the evaluated single-layer networks through the whole engine
// at its default parameters: square layers of 10x10, 15x15, 20x20, 25x25 and 30x30
// neurons, each in the 4-neighbour, 8-neighbour and full-connected scheme. As in the
// evaluation setup, every neuron receives an external stimulus (input current drawn
// from 0..1, so all neurons stay excited), membrane potentials start at random values
// between 0 and 1, theta = 1, and every weight starts at 0.12 with gamma = 0.1 and
// mu = 0.3. For each size and scheme the testbench runs one topology-update-phase
// with random fire-start and fire-stop events and one topology-vector-phase that
// integrates every neuron (modified midpoint; 4 substeps sparse, 6 substeps
// full-connected) and compares each result with the reference model. In the
// full-connected configuration it also measures the PE cycles per neuron against the
// timing estimate [10 + 12 + ceil(n/2)] * (2(i+1)+1) with i = 2: the count must lie
// between the estimate and the estimate plus 8 cycles per pass.
module tb_see_workload;
  import see_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NMAX = 900, KB = 420000;
  int W = 10, H = 10, N = 100;
  logic [15:0] cfg_width, cfg_height;
  conn_e cfg_mode;
  neuron_t cfg_n_input;
  logic cmd_init, cmd_vec, cmd_upd, ntc_busy, ntc_done;
  logic del_rd_valid, del_rd_last, del_rd_ready, evt_valid, evt_ready;
  neuron_t del_rd_neuron, evt_neuron, del_wr_neuron;
  logic [1:0] evt_kind;
  logic del_wr_valid, del_wr_ready;
  logic [31:0] fire_cnt;
  logic [15:0] cfg_stride, cfg_n_syn, cfg_h;
  logic [2:0] cfg_seq_i;
  logic [MEM_AW-1:0] cfg_kbase;
  logic res_valid [3], pe_busy [3];
  neuron_t res_neuron [3];
  logic [1:0] res_ch [3];
  logic [31:0] dispatched [3];
  mem_req_t sdram_req [3];
  mem_rsp_t sdram_rsp [3];

  see_top dut (.*);

  for (genvar c = 0; c < 3; c++) begin : g_ch
    sdram_model #(.LAT(10), .WORDS(1 << 19)) u_sd (.clk, .req(sdram_req[c]), .rsp(sdram_rsp[c]));
  end

  int checks = 0, failures = 0;
  int n_delwr = 0, n_clear = 0, n_tv_stall = 0, n_del_stall = 0, n_res_sp = 0, n_res_fc = 0;
  int pending = 0;
  bit ftf [NMAX], del [NMAX];
  kvec_t expy [NMAX];
  longint fc_busy = 0;
  int fc_neurons = 0;

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
      list.push_back((rr >= 0 && rr < H && cc >= 0 && cc < W) ? rr * W + cc : -1);
    end
  endfunction

  task automatic sd_wr(int ch, int addr, logic [63:0] d);
    case (ch)
      0: g_ch[0].u_sd.mem[addr] = d;
      1: g_ch[1].u_sd.mem[addr] = d;
      default: g_ch[2].u_sd.mem[addr] = d;
    endcase
  endtask

  function automatic logic [63:0] res_word(int p, int c, int addr);
    if (cfg_mode == CONN_FC || c == 0) begin
      case (cfg_mode == CONN_FC ? c : p)
        0: return g_ch[0].u_sd.mem[addr];
        1: return g_ch[1].u_sd.mem[addr];
        default: return g_ch[2].u_sd.mem[addr];
      endcase
    end
    case (p * 2 + c - 1)
      0: return dut.u_nsc.g_pe[0].g_kb[0].u_kb.mem[addr % 2048];
      1: return dut.u_nsc.g_pe[0].g_kb[1].u_kb.mem[addr % 2048];
      2: return dut.u_nsc.g_pe[1].g_kb[0].u_kb.mem[addr % 2048];
      3: return dut.u_nsc.g_pe[1].g_kb[1].u_kb.mem[addr % 2048];
      4: return dut.u_nsc.g_pe[2].g_kb[0].u_kb.mem[addr % 2048];
      default: return dut.u_nsc.g_pe[2].g_kb[1].u_kb.mem[addr % 2048];
    endcase
  endfunction

  task automatic make_nib(int k, bit xl[]);
    kvec_t k0;
    logic [63:0] w;
    int n = int'(cfg_n_syn), ch, addr;
    k0.w = new[n]; k0.g = new[n]; k0.mu = new[n];
    k0.a = $urandom_range(0, 4096); k0.ik = $urandom_range(0, 4096);
    k0.theta = 4096; k0.flags = ftf[k];
    for (int s = 0; s < n; s++) begin
      k0.w[s] = 491; k0.g[s] = 26; k0.mu[s] = 77;
    end
    ch   = (cfg_mode == CONN_FC) ? 0 : k % 3;
    addr = (cfg_mode == CONN_FC) ? k * int'(cfg_stride) : (k / 3) * int'(cfg_stride);
    sd_wr(ch, addr, {32'(k0.ik), 32'(k0.a)});
    sd_wr(ch, addr + 1, {32'(k0.flags), 32'(k0.theta)});
    for (int j = 0; j < (n + 1) / 2; j++) begin
      w = '0;
      for (int l = 0; l < 2; l++)
        if (2 * j + l < n) w[32*l +: 32] = {16'(k0.w[2*j+l]), 8'(k0.g[2*j+l]), 8'(k0.mu[2*j+l])};
      sd_wr(ch, addr + 2 + j, w);
    end
    expy[k] = mmid(k0, xl, 2 * (int'(cfg_seq_i) + 1), int'(cfg_h));
  endtask

  always @(negedge clk) del_wr_ready <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n) begin
    if (del_wr_valid && !del_wr_ready) n_del_stall++;
    if (dut.tv_valid && !dut.tv_ready) n_tv_stall++;
    if (cfg_mode == CONN_FC && pe_busy[0]) fc_busy++;
    if (del_wr_valid && del_wr_ready) begin
      n_delwr++;
      check(!del[del_wr_neuron], $sformatf("neuron %0d listed twice", del_wr_neuron));
      del[del_wr_neuron] = 1;
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < 3; p++) if (res_valid[p]) begin
      logic [63:0] w;
      bit ok;
      int k, base;
      k = int'(res_neuron[p]);
      // k-buffer regions: kbase in SDRAM, address 0 in the on-chip buffers
      base = (cfg_mode != CONN_FC && res_ch[p] != 0) ? 0 : KB;
      w = res_word(p, res_ch[p], base);
      ok = $signed(w[31:0]) == 32'(expy[k].a);
      for (int s = 0; s < expy[k].w.size(); s++) begin
        w = res_word(p, res_ch[p], base + 2 + s / 2);
        if ($signed(s % 2 ? w[63:48] : w[31:16]) != 16'(expy[k].w[s])) ok = 0;
      end
      check(ok, $sformatf("result of neuron %0d on PE %0d", k, p));
      if (cfg_mode == CONN_FC) begin n_res_fc++; fc_neurons++; end else n_res_sp++;
      pending--;
    end
  end

  task automatic send_evt(logic [1:0] kind, int k);
    evt_valid = 1; evt_kind = kind; evt_neuron = NEURON_W'(k);
    #1;
    while (!evt_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    evt_valid = 0;
  endtask

  task automatic wait_done();
    while (!ntc_done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic compare_del();
    bit ok = 1;
    for (int k = 0; k < N; k++)
      if (dut.u_ntc.u_etf.mem[k / 32][k % 32] != del[k] || dut.u_ntc.u_ftf.mem[k / 32][k % 32] != ftf[k]) ok = 0;
    check(ok, "DEL and tag fields agree");
  endtask

  task automatic update_phase();
    int starts[$], stops[$];
    for (int k = 0; k < N; k++) begin
      if (!ftf[k] && $urandom_range(0, 3) == 0) starts.push_back(k);
      else if (ftf[k] && $urandom_range(0, 1) == 0) stops.push_back(k);
    end
    cmd_upd = 1; @(negedge clk); cmd_upd = 0;
    foreach (starts[i]) begin send_evt(2'd0, starts[i]); ftf[starts[i]] = 1; del[starts[i]] = 1; end
    foreach (stops[i]) begin send_evt(2'd1, stops[i]); ftf[stops[i]] = 0; end
    send_evt(2'd3, 0);
    wait_done();
    compare_del();
  endtask

  task automatic vector_phase();
    int list[$], l[$];
    bit zero [NMAX];
    for (int k = 0; k < N; k++) if (del[k]) list.push_back(k);
    if (list.size() == 0) return;
    foreach (list[i]) begin
      bit xl [];
      int k = list[i];
      xl = new[int'(cfg_n_syn)];
      zero[k] = 1;
      if (cfg_mode == CONN_FC) begin
        for (int s = 0; s < N; s++) xl[s] = ftf[s];
        for (int s = 0; s < N; s++) if (ftf[s] && s != k) zero[k] = 0;
      end else begin
        nbrs(k, cfg_mode, l);
        foreach (l[s]) begin
          xl[s] = (l[s] >= 0) && ftf[l[s]];
          if (xl[s]) zero[k] = 0;
        end
      end
      make_nib(k, xl);
    end
    cmd_vec = 1; @(negedge clk); cmd_vec = 0;
    foreach (list[i]) begin
      del_rd_valid = 1; del_rd_neuron = NEURON_W'(list[i]); del_rd_last = (i == list.size() - 1);
      pending++;
      #1;
      while (!del_rd_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      del_rd_valid = 0;
    end
    wait_done();
    while (pending > 0) @(negedge clk);
    foreach (list[i]) if (zero[list[i]] && list[i] >= int'(cfg_n_input)) begin del[list[i]] = 0; n_clear++; end
    compare_del();
  endtask

  initial begin
    int sizes [5] = '{10, 15, 20, 25, 30};
    cmd_init = 0; cmd_vec = 0; cmd_upd = 0; del_rd_valid = 0; del_rd_last = 0;
    del_rd_neuron = '0; evt_valid = 0; evt_kind = '0; evt_neuron = '0; cfg_mode = CONN_4N;
    cfg_h = 2048; cfg_seq_i = 1; cfg_kbase = KB; cfg_stride = 4; cfg_n_syn = 4;
    cfg_width = 10; cfg_height = 10; cfg_n_input = 100;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (sizes[si]) for (int mi = 0; mi < 3; mi++) begin
      int est, n_before;
      W = sizes[si]; H = sizes[si]; N = W * H;
      cfg_width = 16'(W); cfg_height = 16'(H); cfg_n_input = NEURON_W'(N);
      cfg_mode   = conn_e'(mi);
      cfg_n_syn  = (mi == 0) ? 16'd4 : (mi == 1) ? 16'd8 : 16'(N);
      cfg_stride = 16'(2 + (int'(cfg_n_syn) + 1) / 2);
      cfg_seq_i  = (mi == 2) ? 3'd2 : 3'd1;
      foreach (ftf[k]) begin ftf[k] = 0; del[k] = 0; end
      cmd_init = 1; @(negedge clk); cmd_init = 0;
      wait_done();
      cmd_upd = 1; @(negedge clk); cmd_upd = 0;
      for (int k = 0; k < N; k++) begin send_evt(2'd2, k); del[k] = 1; end
      send_evt(2'd3, 0);
      wait_done();
      compare_del();
      fc_busy = 0; fc_neurons = 0; n_before = n_res_sp + n_res_fc;
      update_phase();
      vector_phase();
      check(n_res_sp + n_res_fc - n_before == N, $sformatf("%0dx%0d scheme %0d: every neuron integrated", W, H, mi));
      if (mi == 2) begin
        est = (10 + 12 + (N + 1) / 2) * 7;
        check(fc_neurons == N && fc_busy >= longint'(est) * N && fc_busy <= longint'(est + 56) * N,
              $sformatf("%0dx%0d fc: %0d PE cycles per neuron, estimate %0d", W, H, fc_busy / N, est));
        $display("%0dx%0d fc: %0d PE cycles per neuron, estimate %0d", W, H, fc_busy / N, est);
      end
    end
    check(n_delwr == 0, "no DEL writes: every neuron is an excited input neuron");
    check(n_tv_stall > 0, "vectors stalled on busy PE");
    $display("DEL writes %0d, vector stalls %0d, DEL stalls %0d, results sparse %0d fc %0d",
             n_delwr, n_tv_stall, n_del_stall, n_res_sp, n_res_fc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
