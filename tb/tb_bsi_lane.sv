// tb_bsi_lane: feeds random synapses through one lane, one per cycle, in all three
// pass kinds, and compares each result with the reference model and its arrival
// exactly 12 cycles after the input (the document's t_MMID).
module tb_bsi_lane;
  import see_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, x_l, x_k, out_valid;
  pass_e pass;
  syn_t syn_cur, syn_out;
  logic signed [15:0] w_prev;
  logic signed [31:0] a_cur, theta;
  logic [15:0] h;
  int checks = 0, failures = 0;
  int cyc = 0;

  bsi_lane dut (.clk, .rst_n, .in_valid, .pass, .syn_cur, .w_prev, .x_l, .x_k,
                .a_cur, .theta, .h, .out_valid, .syn_out);

  typedef struct { int t; longint w; logic [15:0] gm; } exp_t;
  exp_t q[$];

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = q.pop_front();
      if (syn_out.weight !== 16'(e.w) || {syn_out.gamma, syn_out.mu} !== e.gm || cyc - e.t != 12) begin
        failures++;
        $display("FAIL got %0d exp %0d latency %0d", syn_out.weight, e.w, cyc - e.t);
      end
    end
  end

  initial begin
    longint dw, inc, s, hh;
    exp_t e;
    in_valid = 0; x_l = 0; x_k = 0; pass = PASS_FIRST; syn_cur = '0; w_prev = '0;
    a_cur = '0; theta = 4096; h = 410;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      pass     = pass_e'($urandom_range(0, 2));
      syn_cur  = '{weight: 16'($urandom_range(0, 8000)) - 16'sd4000,
                   gamma: 8'($urandom), mu: 8'($urandom)};
      w_prev   = 16'($urandom_range(0, 8000)) - 16'sd4000;
      x_l      = 1'($urandom);
      x_k      = ($urandom_range(0, 3) == 0);
      a_cur    = 32'($urandom_range(0, 8192));
      theta    = 32'($urandom_range(2048, 8192));
      h        = 16'($urandom_range(0, 4096));
      if (i == 7) begin syn_cur.weight = 16'sh7f00; w_prev = 16'sh7f00; pass = PASS_MID;
                        h = 16'hffff; x_l = 1; x_k = 0; a_cur = 32'sd100000; end
      if (in_valid) begin
        dw = deriv(syn_cur.weight, syn_cur.gamma, syn_cur.mu, a_cur, theta, x_l, x_k);
        hh = (pass == PASS_MID) ? 2 * longint'(h) : longint'(h);
        inc = (hh * dw) >>> 12;
        if (pass == PASS_FIRST)    s = syn_cur.weight + inc;
        else if (pass == PASS_MID) s = w_prev + inc;
        else                       s = (syn_cur.weight + w_prev + inc) >>> 1;
        e.t = cyc; e.w = sat16(s); e.gm = {syn_cur.gamma, syn_cur.mu};
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
