// sdram_model: behavioural model of one SDRAM channel as seen through its controller
// (not synthesizable intent, for testbenches only). Requests use see_pkg::mem_req_t;
// a read returns its 64-bit word LAT cycles later, in order; a write lands at once.
// Addresses wrap modulo WORDS. The default LAT of 10 cycles is the worst-case SDRAM
// latency assumed by the timing estimate of the processing element.
module sdram_model
  import see_pkg::*;
#(
  parameter int unsigned LAT   = 10,
  parameter int unsigned WORDS = 4096
) (
  input  logic     clk,
  input  mem_req_t req,
  output mem_rsp_t rsp
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [MEM_DW-1:0] mem [WORDS];
  mem_rsp_t pipe [LAT];
  int unsigned reads, writes;

  initial begin
    reads = 0; writes = 0;
    for (int i = 0; i < int'(LAT); i++) pipe[i] = '0;
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    pipe[0].valid <= req.rd;
    pipe[0].rdata <= mem[req.addr[AW-1:0]];
    for (int i = 1; i < int'(LAT); i++) pipe[i] <= pipe[i-1];
    if (req.wr) begin
      mem[req.addr[AW-1:0]] <= req.wdata;
      writes <= writes + 1;
    end
    if (req.rd) reads <= reads + 1;
  end
  assign rsp = pipe[LAT-1];
endmodule
