// result_memory: dual-port RAM that holds the current value of every neuron.
//
// Port A writes (the activation-function results, or network inputs loaded by
// the host); port B reads (the control logic fetching inputs of the next
// layer, or the host reading outputs). Both ports work in the same cycle, as
// in the dual-port block RAM the reference build uses. The read is synchronous:
// rdata holds the word at raddr one clock after raddr is presented. A read of
// the address written in the same cycle returns the old value (read-first).
// Contents are not reset; the RAM starts cleared. Depth 1024 x 18 bits is the
// reference build's; the read-first behaviour is this design's choice.
module result_memory
  import nna_pkg::*;
#(
  parameter int unsigned DEPTH = NEURON_DEPTH
) (
  input  logic   clk,
  // port A: write
  input  logic   we,
  input  naddr_t waddr,
  input  data_t  wdata,
  // port B: read
  input  naddr_t raddr,
  output data_t  rdata
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  data_t mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= mem[raddr[AW-1:0]];
  end

endmodule
