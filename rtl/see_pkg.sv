// see_pkg: types and constants shared by the spiking-network emulation engine.
// Neuron numbers are 19 bits wide (up to 2^19 = 512 K neurons, the worst case the
// dynamic event list can hold). The NSC side uses 64-bit memory words (8-byte SDRAM
// bus, two 4-byte synapse words per access). Number formats are this design's choice:
// membrane potential, threshold and input current are signed 32-bit values with 12
// fraction bits; a weight is signed 16-bit with 12 fraction bits; decay constant and
// gain factor are unsigned 8-bit values with 8 fraction bits, so that weight, decay
// and gain together fill the 4-byte synapse word.
package see_pkg;
  localparam int NEURON_W = 19;           // 2^19 neurons
  localparam int NBR      = 8;            // presynaptic neighbours in the 8n scheme
  localparam int FRAC     = 12;           // fraction bits of potentials and weights
  localparam int MEM_AW   = 27;           // 1 GB / 8 B words per channel
  localparam int MEM_DW   = 64;           // SDRAM data bus
  localparam int NIB_HDR  = 2;            // 16 bytes of neuron parameters = 2 words

  typedef logic [NEURON_W-1:0] neuron_t;

  typedef enum logic [1:0] {
    CONN_4N = 2'd0,   // 4-nearest-neighbour lateral connections
    CONN_8N = 2'd1,   // 8-nearest-neighbour lateral connections
    CONN_FC = 2'd2    // laterally full-connected
  } conn_e;

  // Synapse word: weight, decay constant gamma, gain factor mu.
  typedef struct packed {
    logic signed [15:0] weight;
    logic [7:0]         gamma;
    logic [7:0]         mu;
  } syn_t;

  // Modified-midpoint pass kinds: k1 = k0 + h f(k0); k(m+1) = k(m-1) + 2h f(k(m));
  // y = (k(N) + k(N-1) + h f(k(N))) / 2.
  typedef enum logic [1:0] {
    PASS_FIRST = 2'd0,
    PASS_MID   = 2'd1,
    PASS_LAST  = 2'd2
  } pass_e;

  // One memory channel as seen by a processing element: read and write requests,
  // read data returns in order a fixed or variable number of cycles later.
  typedef struct packed {
    logic              rd;
    logic              wr;
    logic [MEM_AW-1:0] addr;
    logic [MEM_DW-1:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic              valid;
    logic [MEM_DW-1:0] rdata;
  } mem_rsp_t;

  // Topology vector sent from the NTC to the NSC.
  typedef struct packed {
    neuron_t          neuron;
    logic [NBR-1:0]   vec;
  } topo_t;

  function automatic logic signed [15:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction
endpackage
