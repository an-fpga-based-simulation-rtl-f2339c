// tb_tag_field: clears a small field, then writes random tags and checks every read
// against a bit array; finally clears again and checks that all tags read zero and
// that busy lasts one cycle per word.
module tb_tag_field;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int N = 256;
  logic clear, busy, rbit, we, wbit;
  logic [7:0] raddr, waddr;
  bit model [N];
  int checks = 0, failures = 0;

  tag_field #(.N_TAGS(N), .WORD(32)) dut (.clk, .rst_n, .clear, .busy, .raddr, .rbit,
                                          .we, .waddr, .wbit);
  task automatic do_clear();
    int n = 0;
    clear = 1; @(negedge clk); clear = 0;
    while (busy) begin @(negedge clk); n++; end
    checks++;
    if (n != N / 32) begin failures++; $display("FAIL clear took %0d", n); end
    foreach (model[i]) model[i] = 0;
  endtask

  initial begin
    clear = 0; we = 0; wbit = 0; raddr = 0; waddr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    do_clear();
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); waddr = 8'($urandom); wbit = 1'($urandom);
      raddr = 8'($urandom);
      #1;
      checks++;
      if (rbit != model[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      @(negedge clk);
      if (we) model[waddr] = wbit;
    end
    we = 0;
    do_clear();
    for (int i = 0; i < N; i++) begin
      raddr = 8'(i); #1;
      checks++;
      if (rbit) begin failures++; $display("FAIL not cleared %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
