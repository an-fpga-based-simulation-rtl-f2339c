// tb_mmid_pe: integrates random neuron information blocks with the processing element
// in the full-connected arrangement (three SDRAM channels of 10-cycle latency) and
// compares the result, left in channel res_ch, with the reference model of
// tb_ref_pkg. Checks: potential, every weight, decay/gain and header words carried
// along, the result channel ((N+1) mod 3) and the cycle count against
// [t_SDRAM + t_MMID + ceil(n/2)] * [2(i+1)+1] with t_SDRAM = 10, t_MMID = 12.
module tb_mmid_pe;
  import see_pkg::*;
  import tb_ref_pkg::*;

  localparam int KB = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start, busy, done;
  logic [MEM_AW-1:0] nib_base, kbase [3];
  logic [15:0]       n_syn, h_int, syn_idx;
  logic [2:0]        seq_i;
  logic [1:0]        res_ch, xl_pair;
  mem_req_t          req [3];
  mem_rsp_t          rsp [3];
  bit                xl [];

  int checks = 0, failures = 0;

  mmid_pe dut (.clk, .rst_n, .start, .nib_base, .n_syn, .h_int, .seq_i, .kbase,
               .busy, .done, .res_ch, .syn_idx, .xl_pair, .req, .rsp);

  for (genvar c = 0; c < 3; c++) begin : g_ch
    sdram_model #(.LAT(10), .WORDS(4096)) u_sd (.clk, .req(req[c]), .rsp(rsp[c]));
  end

  always_comb begin
    xl_pair = '0;
    if (int'(syn_idx) < xl.size())     xl_pair[0] = xl[syn_idx];
    if (int'(syn_idx) + 1 < xl.size()) xl_pair[1] = xl[syn_idx + 1];
  end

  task automatic wr(int ch, int addr, logic [63:0] d);
    case (ch)
      0: g_ch[0].u_sd.mem[addr] = d;
      1: g_ch[1].u_sd.mem[addr] = d;
      default: g_ch[2].u_sd.mem[addr] = d;
    endcase
  endtask

  function automatic logic [63:0] rd(int ch, int addr);
    case (ch)
      0: return g_ch[0].u_sd.mem[addr];
      1: return g_ch[1].u_sd.mem[addr];
      default: return g_ch[2].u_sd.mem[addr];
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_case(int n, int si, int base, int hbig, bit xk);
    kvec_t k0, y;
    int cycles, words, nsub, expect_min, expect_max;
    logic [63:0] w;
    logic [31:0] sw;
    logic signed [15:0] gw;
    k0.w = new[n]; k0.g = new[n]; k0.mu = new[n];
    xl = new[n];
    k0.a     = $urandom_range(0, 4096);
    k0.ik    = $urandom_range(0, 4096);
    k0.theta = 4096;
    k0.flags = xk;
    for (int s = 0; s < n; s++) begin
      k0.w[s]  = 491 + int'($urandom_range(0, 400)) - 200;
      k0.g[s]  = 26;
      k0.mu[s] = 77;
      xl[s]    = $urandom_range(0, 1);
    end
    words = 2 + (n + 1) / 2;
    wr(0, base,     {32'(k0.ik), 32'(k0.a)});
    wr(0, base + 1, {32'(k0.flags), 32'(k0.theta)});
    for (int j = 0; j < (n + 1) / 2; j++) begin
      w = '0;
      for (int l = 0; l < 2; l++)
        if (2 * j + l < n) w[32*l +: 32] = {16'(k0.w[2*j+l]), 8'(k0.g[2*j+l]), 8'(k0.mu[2*j+l])};
      wr(0, base + 2 + j, w);
    end
    nsub = 2 * (si + 1);
    y = mmid(k0, xl, nsub, hbig);

    @(negedge clk);
    nib_base = MEM_AW'(base); n_syn = 16'(n); seq_i = 3'(si); h_int = 16'(hbig);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(res_ch == 2'((nsub + 1) % 3), $sformatf("res_ch %0d", res_ch));
    w = rd(res_ch, KB);
    check($signed(w[31:0]) == 32'(y.a), $sformatf("a got %0d exp %0d", $signed(w[31:0]), y.a));
    check(w[63:32] == 32'(k0.ik), "i_K carried");
    w = rd(res_ch, KB + 1);
    check(w == {32'(k0.flags), 32'(k0.theta)}, "flags/theta carried");
    for (int s = 0; s < n; s++) begin
      w  = rd(res_ch, KB + 2 + s / 2);
      sw = (s % 2 == 1) ? w[63:32] : w[31:0];
      gw = sw[31:16];
      check(gw == 16'(y.w[s]),
            $sformatf("n=%0d i=%0d w[%0d] got %0d exp %0d", n, si, s, gw, y.w[s]));
      check(sw[15:0] == {8'(k0.g[s]), 8'(k0.mu[s])}, "gamma/mu carried");
    end
    // document's estimate and this design's fixed overhead per pass
    expect_min = (10 + 12 + (n + 1) / 2) * (nsub + 1);
    expect_max = expect_min + 8 * (nsub + 1);
    check(cycles >= expect_min && cycles <= expect_max,
          $sformatf("cycles %0d outside [%0d,%0d]", cycles, expect_min, expect_max));
    $display("n=%0d i=%0d cycles=%0d paper T_MMID=%0d", n, si, cycles, expect_min);
  endtask

  initial begin
    start = 0; nib_base = '0; n_syn = '0; h_int = '0; seq_i = '0;
    kbase = '{KB, KB, KB};
    xl = new[0];
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(7, 0, 0, 410, 0);
    run_case(8, 1, 16, 4096, 0);
    run_case(25, 2, 40, 2048, 0);
    run_case(6, 1, 100, 3000, 1);
    run_case(100, 2, 200, 4096, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
