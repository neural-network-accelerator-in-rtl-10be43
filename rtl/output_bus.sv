// output_bus: the single shared bus from the computing blocks to the
// activation function.
//
// Every computing block whose result register is full raises its request
// (its res.valid). In each clock cycle the bus grants the requesting block
// with the lowest index (fixed priority, block 0 highest) and passes that
// block's result word to the activation function in the same cycle. The
// granted block frees its result register at the next clock edge, so the bus
// moves one neuron result per clock. Purely combinational.
// A single bus with block-priority ordering follows the reference design;
// fixed priority by index (lowest first) and the one-word-per-cycle grant are
// this design's reading of it.
module output_bus
  import nna_pkg::*;
#(
  parameter int unsigned N = NUM_BLOCKS
) (
  input  out_bus_t       res   [N],
  output logic [N-1:0]   grant,
  output out_bus_t       af_in
);

  always_comb begin
    grant = '0;
    af_in = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (res[i].valid) begin
        grant    = '0;
        grant[i] = 1'b1;
        af_in    = res[i];
      end
    end
  end

endmodule
