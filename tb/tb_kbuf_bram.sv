// tb_kbuf_bram: writes random words to random addresses, reads them back and checks
// data and the one-cycle read latency, including address wrap-around.
module tb_kbuf_bram;
  import see_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mem_req_t req;
  mem_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [63:0] model [256];

  kbuf_bram #(.WORDS(256)) dut (.clk, .rst_n, .req, .rsp);

  initial begin
    int a;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      req = '{rd: 1'b0, wr: 1'b1, addr: MEM_AW'(i), wdata: {$urandom, $urandom}};
      model[i] = req.wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 400; i++) begin
      a = $urandom_range(0, 1023);
      req = '{rd: 1'b1, wr: 1'b0, addr: MEM_AW'(a), wdata: '0};
      @(negedge clk);
      req = '0;
      checks++;
      if (!rsp.valid || rsp.rdata !== model[a % 256]) begin
        failures++; $display("FAIL addr %0d", a);
      end
      if ($urandom_range(0, 3) == 0) begin
        req = '{rd: 1'b0, wr: 1'b1, addr: MEM_AW'(a), wdata: {$urandom, $urandom}};
        model[a % 256] = req.wdata;
        @(negedge clk);
        req = '0;
        checks++;
        if (rsp.valid) begin failures++; $display("FAIL valid without read"); end
      end
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
