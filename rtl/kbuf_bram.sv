// kbuf_bram: on-chip block RAM buffer for the intermediate modified-midpoint values
// k(m) of one neuron, used by a processing element in the sparse configuration in
// place of an external memory channel. It speaks the same request/response format as
// an SDRAM channel: a read issued in one cycle returns its data on rsp one cycle later;
// a write takes effect on the clock edge. Addresses wrap modulo WORDS. The document
// gives the on-chip storage (175 KB of BRAM); 2048 words per buffer, two buffers per
// PE (96 KB for three PEs) is this design's choice.
module kbuf_bram
  import see_pkg::*;
#(
  parameter int unsigned WORDS = 2048
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req,
  output mem_rsp_t rsp
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [MEM_DW-1:0] mem [WORDS];
  logic [MEM_DW-1:0] rdata_q;
  logic              valid_q;

  assign rsp = '{valid: valid_q, rdata: rdata_q};

  always_ff @(posedge clk) begin
    if (req.wr) mem[req.addr[AW-1:0]] <= req.wdata;
    rdata_q <= mem[req.addr[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= 1'b0;
    else        valid_q <= req.rd;
  end

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(req.rd && req.wr));
endmodule
