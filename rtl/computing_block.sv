// computing_block: one neuron processor of the accelerator.
//
// The block holds its own weight table; the control logic broadcasts an input
// value together with a pointer into that table on the shared input bus, and
// every selected block multiplies the value by its own weight. The
// multiply-accumulate is split over two pipeline stages, as the target FPGA
// has multipliers but no MAC unit:
//   stage 1  input register for the data and the weight read from the table
//            (synchronous read at bus.wptr)
//   stage 2  36-bit product register
//   stage 3  adder with the accumulator register fed back; on the last input
//            of a neuron the sum, saturated to Q6.12, goes to the result
//            register instead of being kept.
// The result register waits, with res.valid high, until the output bus grants
// the block (grant high for one cycle), then is freed. The neuron address is
// tag + BLOCK_ID, taken from the first word of a neuron.
//
// Timing: a bus word with last=1 presented at cycle t makes res.valid high
// after CB_LATENCY (3) clock edges. One input per clock, no bubbles.
// The control logic must not let a new result arrive while the old one still
// waits; an assertion checks this. The pipeline split, the table pointer and
// the result register follow the reference design; the accumulator width
// (48 bits), the truncating conversion back to Q6.12 with saturation, and the
// tag scheme are this design's choices.
module computing_block
  import nna_pkg::*;
#(
  parameter int unsigned BLOCK_ID = 0,
  parameter int unsigned DEPTH    = WEIGHT_DEPTH
) (
  input  logic     clk,
  input  logic     rst_n,
  // shared input bus and this block's select line for the current pass
  input  in_bus_t  bus,
  input  logic     sel,
  // weight table load port
  input  logic     w_we,
  input  wptr_t    w_addr,
  input  data_t    w_data,
  // result register towards the shared output bus
  output out_bus_t res,
  input  logic     grant
);

  // Weight lookup table
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  data_t wtab [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) wtab[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (w_we) wtab[w_addr[AW-1:0]] <= w_data;
  end

  // Stage 1: data and weight registers
  data_t  d1, w1;
  logic   v1, f1, l1;
  naddr_t t1;

  always_ff @(posedge clk) begin
    w1 <= wtab[bus.wptr[AW-1:0]];
    d1 <= bus.data;
    f1 <= bus.first;
    l1 <= bus.last;
    t1 <= bus.tag + naddr_t'(BLOCK_ID);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= bus.valid && sel;
  end

  // Stage 2: product register
  logic signed [PROD_W-1:0] p2;
  logic   v2, f2, l2;
  naddr_t t2;

  always_ff @(posedge clk) begin
    p2 <= d1 * w1;
    f2 <= f1;
    l2 <= l1;
    t2 <= t1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end

  // Stage 3: accumulator and result register
  logic signed [ACC_W-1:0] acc, sum;
  naddr_t tag_q;

  always_comb begin
    sum = (f2 ? ACC_W'(0) : acc) + ACC_W'(p2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      tag_q <= '0;
      res   <= '0;
    end else begin
      if (v2) begin
        acc <= sum;
        if (f2) tag_q <= t2;
      end
      if (v2 && l2) begin
        res.valid <= 1'b1;
        res.data  <= sat_data(sum >>> FRAC_W);
        res.addr  <= f2 ? t2 : tag_q;
      end else if (grant) begin
        res.valid <= 1'b0;
      end
    end
  end

  // A finished neuron must never overwrite a result that still waits
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (v2 && l2) |-> (!res.valid || grant));
  // The output bus grants only a waiting result
  a_grant_valid: assert property (@(posedge clk) disable iff (!rst_n)
    grant |-> res.valid);

endmodule
