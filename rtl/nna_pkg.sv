// nna_pkg: types and constants shared by the neural network accelerator.
//
// Numbers inside the accelerator are 18-bit two's-complement fixed point,
// Q6.12: the 6 most significant bits are the integer part and the 12 least
// significant bits the fraction, matching the 18x18 hardware multipliers of
// the target FPGA family. The default sizes are the ones of the reference
// build: 10 computing blocks, 1024 weights per block (10240 synapses) and
// 1024 neuron values in the result memory. The network-map depth and the
// bus and map formats below are this design's own choices.
package nna_pkg;

  // Fixed-point format (Q6.12)
  localparam int unsigned DATA_W = 18;
  localparam int unsigned FRAC_W = 12;
  localparam int unsigned INT_W  = DATA_W - FRAC_W;   // 6, indexes the activation table

  // Default sizes of the reference build
  localparam int unsigned NUM_BLOCKS   = 10;    // computing blocks
  localparam int unsigned WEIGHT_DEPTH = 1024;  // weights per computing block
  localparam int unsigned NEURON_DEPTH = 1024;  // neuron values in the result memory
  localparam int unsigned MAP_DEPTH    = 16;    // layer entries in the network map

  // Address widths (fixed, the depths above may be made smaller)
  localparam int unsigned NAW = 10;             // neuron address
  localparam int unsigned WAW = 10;             // weight pointer
  localparam int unsigned MAW = 4;              // network map address
  localparam int unsigned BLK_W = 4;            // computing block index

  // Accumulator width: full 36-bit products summed with 12 guard bits
  localparam int unsigned PROD_W = 2 * DATA_W;
  localparam int unsigned ACC_W  = PROD_W + 12;

  // Pipeline latencies in clock edges, from a bus word to the registered output
  localparam int unsigned CB_LATENCY = 3;       // input bus -> result register
  localparam int unsigned AF_LATENCY = 3;       // activation input -> output

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic [NAW-1:0]           naddr_t;
  typedef logic [WAW-1:0]           wptr_t;

  // One word on the shared input bus of the computing blocks
  typedef struct packed {
    logic   valid;   // word carries a (data, weight pointer) pair
    logic   first;   // first input of a neuron: accumulator restarts
    logic   last;    // last input of a neuron: sum goes to the result register
    data_t  data;    // input value, broadcast to all selected blocks
    wptr_t  wptr;    // pointer into every block's weight table
    naddr_t tag;     // neuron address of block 0 for this pass
  } in_bus_t;

  // One word on the shared output bus (and on the activation output)
  typedef struct packed {
    logic   valid;
    data_t  data;
    naddr_t addr;    // neuron address the value belongs to
  } out_bus_t;

  // One layer of the network map
  typedef struct packed {
    naddr_t         in_base;    // address of the layer's first input value
    logic [NAW:0]   in_count;   // number of inputs per neuron, 1..NEURON_DEPTH
    naddr_t         out_base;   // address of the layer's first neuron
    logic [NAW:0]   out_count;  // number of neurons in the layer, >= 1
    wptr_t          w_base;     // weight pointer of the layer's first weight
    logic           last;       // final layer of the network
  } map_entry_t;

  // Saturate a wide signed value into Q6.12
  function automatic data_t sat_data(input logic signed [ACC_W-1:0] v);
    localparam logic signed [ACC_W-1:0] MAXV = (ACC_W'(1) <<< (DATA_W - 1)) - 1;
    localparam logic signed [ACC_W-1:0] MINV = -(ACC_W'(1) <<< (DATA_W - 1));
    if (v > MAXV)      return data_t'(MAXV);
    else if (v < MINV) return data_t'(MINV);
    else               return data_t'(v);
  endfunction

endpackage
