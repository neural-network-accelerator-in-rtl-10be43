// nn_accelerator: multi-core accelerator for feed-forward neural networks.
//
// NB computing blocks share one input bus driven by the control logic: every
// clock one input value and one weight pointer reach all blocks of the current
// pass, and each block multiplies the value by its own stored weight and
// accumulates, so NB neurons of a layer are computed in parallel at one
// multiply-add per block per clock. Finished sums wait in the blocks' result
// registers and leave one per clock over a single output bus, lowest block
// first, into the one pipelined activation-function unit. Its results are
// written into the dual-port result memory, from which the control logic
// reads the inputs of the next layer while new results are being stored.
//
//   data in --> control_logic --(input bus)--> computing_block x NB
//                    ^                                |
//                    |                          output_bus (priority)
//                    |                                |
//              result_memory <-- activation_function <-
//
// Host interface (all synchronous to clk, active-low asynchronous reset):
//   w_we/w_block/w_addr/w_data       write one weight of one computing block
//   lut_we/lut_addr/lut_level/grad   rewrite one activation-table interval
//   map_we/map_addr/map_wdata        write one layer of the network map (idle)
//   in_we/in_addr/in_data            write a network input into memory (idle)
//   start -> busy ... done           run the whole map once
//   out_addr -> out_data             read any neuron value, one clock later
// Numbers are Q6.12 throughout. Default sizes: 10 blocks of 1024 weights
// (10240 synapses), 1024 neuron values, as in the reference build; the host
// interface is this design's own.
module nn_accelerator
  import nna_pkg::*;
#(
  parameter int unsigned NB         = NUM_BLOCKS,
  parameter int unsigned W_DEPTH    = WEIGHT_DEPTH,
  parameter int unsigned N_DEPTH    = NEURON_DEPTH,
  parameter int unsigned M_DEPTH    = MAP_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  // run control
  input  logic             start,
  output logic             busy,
  output logic             done,
  // weight load
  input  logic             w_we,
  input  logic [BLK_W-1:0] w_block,
  input  wptr_t            w_addr,
  input  data_t            w_data,
  // activation table load
  input  logic             lut_we,
  input  logic [INT_W-1:0] lut_addr,
  input  data_t            lut_level,
  input  data_t            lut_grad,
  // network map load
  input  logic             map_we,
  input  logic [MAW-1:0]   map_addr,
  input  map_entry_t       map_wdata,
  // data input / data output
  input  logic             in_we,
  input  naddr_t           in_addr,
  input  data_t            in_data,
  input  naddr_t           out_addr,
  output data_t            out_data,
  // status
  output logic             stall,
  output logic             barrier
);

  in_bus_t        bus;
  logic [NB-1:0]  sel, grant, pending;
  out_bus_t       res [NB];
  out_bus_t       af_in, af_out;
  logic           ld_we;
  naddr_t         ld_addr, mem_raddr;
  data_t          ld_data, mem_rdata;

  control_logic #(.NB(NB), .DEPTH(M_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .map_we, .map_addr, .map_wdata,
    .in_we, .in_addr, .in_data, .out_addr, .out_data,
    .ld_we, .ld_addr, .ld_data, .mem_raddr, .mem_rdata,
    .mem_written(af_out.valid),
    .bus, .sel, .res_pending(pending),
    .stall, .barrier
  );

  for (genvar k = 0; k < int'(NB); k++) begin : g_cb
    computing_block #(.BLOCK_ID(k), .DEPTH(W_DEPTH)) u_cb (
      .clk, .rst_n, .bus, .sel(sel[k]),
      .w_we(w_we && (w_block == BLK_W'(k))), .w_addr, .w_data,
      .res(res[k]), .grant(grant[k])
    );
    assign pending[k] = res[k].valid;
  end

  output_bus #(.N(NB)) u_obus (.res, .grant, .af_in);

  activation_function u_af (
    .clk, .rst_n, .in(af_in), .out(af_out),
    .lut_we, .lut_addr, .lut_level, .lut_grad
  );

  // Memory write port: activation results; host loads only happen when idle,
  // when no activation result can be in flight.
  result_memory #(.DEPTH(N_DEPTH)) u_mem (
    .clk,
    .we   (af_out.valid || ld_we),
    .waddr(af_out.valid ? af_out.addr : ld_addr),
    .wdata(af_out.valid ? af_out.data : ld_data),
    .raddr(mem_raddr),
    .rdata(mem_rdata)
  );

endmodule
