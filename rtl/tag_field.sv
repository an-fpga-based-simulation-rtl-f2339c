// tag_field: one tag bit per neuron, used twice in the NTC as the fire tag field
// (FTF, set while a neuron is sending) and the excitation tag field (ETF, set while a
// neuron is firing or excited). It stands for an external SRAM together with its
// controller. The read port is combinational (address in, bit out in the same cycle);
// the write port updates one bit on the clock edge. A clear request wipes the whole
// field one word of WORD bits per cycle (this design's way of initialising the SRAM;
// busy is high meanwhile). Depth is the 2^19 neurons the event lists allow.
module tag_field #(
  parameter int unsigned N_TAGS = 1 << 19,
  parameter int unsigned WORD   = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  output logic                        busy,
  input  logic [$clog2(N_TAGS)-1:0]   raddr,
  output logic                        rbit,
  input  logic                        we,
  input  logic [$clog2(N_TAGS)-1:0]   waddr,
  input  logic                        wbit
);
  localparam int unsigned WORDS = N_TAGS / WORD;
  localparam int unsigned AW    = $clog2(N_TAGS);
  localparam int unsigned BW    = $clog2(WORD);

  logic [WORD-1:0] mem [WORDS];
  logic [AW-BW-1:0] clr_ptr;

  assign rbit = mem[raddr[AW-1:BW]][raddr[BW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      clr_ptr <= '0;
    end else if (clear && !busy) begin
      busy    <= 1'b1;
      clr_ptr <= '0;
    end else if (busy) begin
      clr_ptr <= clr_ptr + 1'b1;
      if (clr_ptr == (AW-BW)'(WORDS - 1)) busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (busy) mem[clr_ptr] <= '0;
    else if (we) mem[waddr[AW-1:BW]][waddr[BW-1:0]] <= wbit;
  end
endmodule
