// tb_nsc_top: the neuron state computation with three SDRAM channel models (10-cycle
// latency), first in the sparse configuration (each PE on its own channel plus two
// on-chip buffers, X_L from the topology vector) and then switched to the
// full-connected configuration (PE 0 on all three channels, X_L from the fire-status
// map). Every result is compared with the reference model the moment its PE reports
// it. Also checks the neuron-to-PE distribution of the topology vector unit and that
// vectors were held back while their PE was busy.
module tb_nsc_top;
  import see_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int KB = 1024;
  logic cfg_fc, tv_valid, tv_ready, fm_clear, fm_we, fm_bit;
  logic [15:0] cfg_stride, cfg_n_syn, cfg_h;
  logic [2:0] cfg_seq_i;
  logic [MEM_AW-1:0] cfg_kbase;
  topo_t tv;
  neuron_t fm_neuron;
  logic res_valid [3], pe_busy [3];
  neuron_t res_neuron [3];
  logic [1:0] res_ch [3];
  logic [31:0] dispatched [3];
  mem_req_t sdram_req [3];
  mem_rsp_t sdram_rsp [3];

  nsc_top #(.N_PE(3), .KBUF_WORDS(64), .N_FIRE(64)) dut (.*);

  for (genvar c = 0; c < 3; c++) begin : g_ch
    sdram_model #(.LAT(10), .WORDS(4096)) u_sd (.clk, .req(sdram_req[c]), .rsp(sdram_rsp[c]));
  end

  int checks = 0, failures = 0, n_res = 0, n_stall = 0;
  kvec_t expy [16];
  bit fire [64];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic sd_wr(int ch, int addr, logic [63:0] d);
    case (ch)
      0: g_ch[0].u_sd.mem[addr] = d;
      1: g_ch[1].u_sd.mem[addr] = d;
      default: g_ch[2].u_sd.mem[addr] = d;
    endcase
  endtask

  function automatic logic [63:0] res_word(int p, int c, int addr);
    if (cfg_fc) begin
      case (c)
        0: return g_ch[0].u_sd.mem[addr];
        1: return g_ch[1].u_sd.mem[addr];
        default: return g_ch[2].u_sd.mem[addr];
      endcase
    end
    if (c == 0) begin
      case (p)
        0: return g_ch[0].u_sd.mem[addr];
        1: return g_ch[1].u_sd.mem[addr];
        default: return g_ch[2].u_sd.mem[addr];
      endcase
    end
    case (p * 2 + c - 1)
      0: return dut.g_pe[0].g_kb[0].u_kb.mem[addr % 64];
      1: return dut.g_pe[0].g_kb[1].u_kb.mem[addr % 64];
      2: return dut.g_pe[1].g_kb[0].u_kb.mem[addr % 64];
      3: return dut.g_pe[1].g_kb[1].u_kb.mem[addr % 64];
      4: return dut.g_pe[2].g_kb[0].u_kb.mem[addr % 64];
      default: return dut.g_pe[2].g_kb[1].u_kb.mem[addr % 64];
    endcase
  endfunction

  // build the NIB of neuron k, store it, and predict its result
  task automatic make_nib(int k, int n, int ch, int addr, bit xl[], int nsub, int hbig);
    kvec_t k0;
    logic [63:0] w;
    k0.w = new[n]; k0.g = new[n]; k0.mu = new[n];
    k0.a = $urandom_range(0, 4096); k0.ik = $urandom_range(0, 4096);
    k0.theta = 4096; k0.flags = ($urandom_range(0, 4) == 0);
    for (int s = 0; s < n; s++) begin
      k0.w[s] = 491 + int'($urandom_range(0, 200)) - 100; k0.g[s] = 26; k0.mu[s] = 77;
    end
    sd_wr(ch, addr, {32'(k0.ik), 32'(k0.a)});
    sd_wr(ch, addr + 1, {32'(k0.flags), 32'(k0.theta)});
    for (int j = 0; j < (n + 1) / 2; j++) begin
      w = '0;
      for (int l = 0; l < 2; l++)
        if (2 * j + l < n) w[32*l +: 32] = {16'(k0.w[2*j+l]), 8'(k0.g[2*j+l]), 8'(k0.mu[2*j+l])};
      sd_wr(ch, addr + 2 + j, w);
    end
    expy[k] = mmid(k0, xl, nsub, hbig);
  endtask

  always @(negedge clk) if (rst_n) begin
    if (tv_valid && !tv_ready) n_stall++;
    for (int p = 0; p < 3; p++) if (res_valid[p]) begin
      logic [63:0] w;
      bit ok;
      int k, base;
      k = int'(res_neuron[p]);
      n_res++;
      // k-buffer regions: kbase in SDRAM, address 0 in the on-chip buffers
      base = (!cfg_fc && res_ch[p] != 0) ? 0 : KB;
      w = res_word(p, res_ch[p], base);
      ok = $signed(w[31:0]) == 32'(expy[k].a);
      for (int s = 0; s < expy[k].w.size(); s++) begin
        w = res_word(p, res_ch[p], base + 2 + s / 2);
        if ($signed(s % 2 ? w[63:48] : w[31:16]) != 16'(expy[k].w[s])) ok = 0;
      end
      check(ok, $sformatf("result of neuron %0d on PE %0d", k, p));
    end
  end

  task automatic send(int k, logic [NBR-1:0] v);
    tv_valid = 1; tv.neuron = NEURON_W'(k); tv.vec = v;
    #1;
    while (!tv_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    tv_valid = 0;
  endtask

  initial begin
    bit xl [];
    logic [NBR-1:0] v;
    tv_valid = 0; tv = '0; fm_clear = 0; fm_we = 0; fm_bit = 0; fm_neuron = '0;
    cfg_fc = 0; cfg_stride = 6; cfg_n_syn = 8; cfg_h = 2048; cfg_seq_i = 1; cfg_kbase = KB;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // sparse configuration: 12 neurons, 8 synapses each, NIB in channel k mod 3
    for (int k = 0; k < 12; k++) begin
      v = NBR'($urandom);
      xl = new[8];
      for (int s = 0; s < 8; s++) xl[s] = v[s];
      make_nib(k, 8, k % 3, (k / 3) * 6, xl, 4, 2048);
      send(k, v);
    end
    while (pe_busy[0] || pe_busy[1] || pe_busy[2]) @(negedge clk);
    repeat (3) @(negedge clk);
    check(n_res == 12, $sformatf("sparse results %0d", n_res));
    check(dispatched[0] == 4 && dispatched[1] == 4 && dispatched[2] == 4, "distribution by neuron");
    // full-connected configuration: 9 neurons, every neuron a synapse of every other
    fm_clear = 1; @(negedge clk); fm_clear = 0;
    repeat (4) @(negedge clk);
    cfg_fc = 1; cfg_stride = 7; cfg_n_syn = 9; cfg_seq_i = 2; cfg_h = 1024;
    for (int k = 0; k < 9; k++) begin
      fire[k] = 1'($urandom);
      fm_we = 1; fm_neuron = NEURON_W'(k); fm_bit = fire[k];
      @(negedge clk);
    end
    fm_we = 0;
    xl = new[9];
    for (int s = 0; s < 9; s++) xl[s] = fire[s];
    for (int k = 0; k < 5; k++) begin
      make_nib(k, 9, 0, k * 7, xl, 6, 1024);
      send(k, '0);
    end
    while (pe_busy[0]) @(negedge clk);
    repeat (3) @(negedge clk);
    check(n_res == 17, $sformatf("all results %0d", n_res));
    check(dispatched[0] == 9 && dispatched[1] == 4, "full-connected uses PE 0 only");
    check(n_stall > 0, "vectors held back while PE busy");
    $display("results %0d stalls %0d", n_res, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
