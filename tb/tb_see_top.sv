// tb_see_top: end-to-end run of the engine with every parameter at its default
// (2^19-neuron tag fields and fire-start buffer, 2048-word on-chip buffers, three
// PEs). The testbench plays the control processor and its dynamic event list (DEL):
// on a 3x3 network it runs rounds of topology-update-phase (random fire-start and
// fire-stop events) and topology-vector-phase in the 4n, 8n and full-connected
// schemes, switching the NSC between its sparse and full-connected configurations.
// Each topology vector is integrated by a PE (modified midpoint, N = 4 or 6
// substeps) and the result is compared with the reference model. The DEL kept by the
// testbench must match the excitation tag field after every phase. Counted
// mechanisms, each required at least once: DEL writes by Tag2NN/Tag Set, ETF clears
// by Tag Cntrl, vectors stalled on a busy PE, stalled DEL writes, results in the
// sparse and in the full-connected configuration.
module tb_see_top;
  import see_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 3, H = 3, N = W * H, KB = 1024;
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
    sdram_model #(.LAT(10), .WORDS(4096)) u_sd (.clk, .req(sdram_req[c]), .rsp(sdram_rsp[c]));
  end

  int checks = 0, failures = 0;
  int n_delwr = 0, n_clear = 0, n_tv_stall = 0, n_del_stall = 0, n_res_sp = 0, n_res_fc = 0;
  int pending = 0;
  bit ftf [N], del [N];
  kvec_t expy [N];

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
    k0.a = $urandom_range(0, 4096); k0.ik = (k < 3) ? 2048 : 0;
    k0.theta = 4096; k0.flags = ftf[k];
    for (int s = 0; s < n; s++) begin
      k0.w[s] = 491 + int'($urandom_range(0, 100)) - 50; k0.g[s] = 26; k0.mu[s] = 77;
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
      if (cfg_mode == CONN_FC) n_res_fc++; else n_res_sp++;
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
      if (dut.u_ntc.u_etf.mem[0][k] != del[k] || dut.u_ntc.u_ftf.mem[0][k] != ftf[k]) ok = 0;
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
    bit zero [N];
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
    foreach (list[i]) if (zero[list[i]] && list[i] >= 3) begin del[list[i]] = 0; n_clear++; end
    compare_del();
  endtask

  initial begin
    cfg_width = W; cfg_height = H; cfg_n_input = 3; cfg_mode = CONN_4N;
    cmd_init = 0; cmd_vec = 0; cmd_upd = 0; del_rd_valid = 0; del_rd_last = 0;
    del_rd_neuron = '0; evt_valid = 0; evt_kind = '0; evt_neuron = '0;
    cfg_h = 2048; cfg_seq_i = 1; cfg_kbase = KB; cfg_stride = 4; cfg_n_syn = 4;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int mi = 0; mi < 3; mi++) begin
      cfg_mode   = conn_e'(mi);
      cfg_n_syn  = (mi == 0) ? 4 : (mi == 1) ? 8 : N;
      cfg_stride = 16'(2 + (int'(cfg_n_syn) + 1) / 2);
      cfg_seq_i  = (mi == 2) ? 3'd2 : 3'd1;
      foreach (ftf[k]) begin ftf[k] = 0; del[k] = 0; end
      cmd_init = 1; @(negedge clk); cmd_init = 0;
      wait_done();
      cmd_upd = 1; @(negedge clk); cmd_upd = 0;
      for (int k = 0; k < 3; k++) begin send_evt(2'd2, k); del[k] = 1; end
      send_evt(2'd3, 0);
      wait_done();
      for (int round = 0; round < 5; round++) begin
        update_phase();
        vector_phase();
      end
    end
    check(n_delwr > 0, "DEL writes");
    check(n_clear > 0, "ETF clears");
    check(n_tv_stall > 0, "vectors stalled on busy PE");
    check(n_del_stall > 0, "DEL writes stalled");
    check(n_res_sp > 0 && n_res_fc > 0, "results in both configurations");
    $display("DEL writes %0d, ETF clears %0d, vector stalls %0d, DEL stalls %0d, results sparse %0d fc %0d",
             n_delwr, n_clear, n_tv_stall, n_del_stall, n_res_sp, n_res_fc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
