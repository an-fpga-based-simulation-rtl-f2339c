// position_cntrl: locates a neuron of the single-layer network on its grid and lists
// the neurons connected to it. Neuron number K sits at row K / width, column K % width.
// In the 4n scheme the neighbours are north, east, south, west (list slots 0..3); the
// 8n scheme adds north-east, south-east, south-west, north-west (slots 4..7). Slots
// that fall outside the grid are marked invalid (no wrap-around). In the full-connected
// scheme every neuron is connected; slot 0 then carries the neuron itself so that the
// controller can read its own fire tag. Purely combinational. The slot order and the
// missing wrap-around are this design's choice; the use of the grid position to find
// the connected neurons follows the document.
module position_cntrl
  import see_pkg::*;
(
  input  neuron_t           neuron,
  input  logic [15:0]       width,
  input  logic [15:0]       height,
  input  conn_e             mode,
  output neuron_t           nbr     [NBR],
  output logic [NBR-1:0]    nbr_vld,
  output logic [15:0]       row,
  output logic [15:0]       col
);
  // row/column offsets of the eight slots
  localparam int DR [NBR] = '{-1, 0, 1, 0, -1, 1, 1, -1};
  localparam int DC [NBR] = '{ 0, 1, 0,-1,  1, 1,-1, -1};

  always_comb begin
    logic [NEURON_W-1:0] q;
    q   = neuron / NEURON_W'(width);
    row = 16'(q);
    col = 16'(neuron - q * NEURON_W'(width));
    for (int s = 0; s < NBR; s++) begin
      int r, c;
      r = int'(row) + DR[s];
      c = int'(col) + DC[s];
      nbr[s]     = NEURON_W'(r * int'(width) + c);
      nbr_vld[s] = (r >= 0) && (r < int'(height)) && (c >= 0) && (c < int'(width));
      if (mode == CONN_4N && s >= 4) nbr_vld[s] = 1'b0;
      if (mode == CONN_FC) begin
        nbr[s]     = (s == 0) ? neuron : '0;
        nbr_vld[s] = (s == 0);
      end
    end
  end
endmodule
