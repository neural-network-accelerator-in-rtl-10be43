// activation_function: piecewise-linear activation by table interpolation.
//
// The Q6.12 input is split into its 6-bit integer part, which selects one of
// 64 unit-wide intervals of a lookup table, and its 12-bit fraction. Each
// table entry holds the level of the function at the start of the interval
// and the gradient across it (the rise over one unit). The output is
//     y = level[int(x)] + (gradient[int(x)] * frac(x)) >> 12
// computed in a three-stage pipeline:
//   stage 1  table read (synchronous) into the level and gradient registers,
//            with the fraction registered beside them
//   stage 2  gradient x fraction product register, level delayed one stage
//   stage 3  adder and output register (result saturated to Q6.12)
// One input per clock; the output appears AF_LATENCY (3) clock edges after
// the input, carrying the input's neuron address with it.
//
// The table can be rewritten through the lut_* port (step, ramp or any other
// function). Its power-up contents are the logistic sigmoid 1/(1+e^-x),
// sampled at the 64 interval starts -32..31 and rounded to Q6.12. The table
// interpolation and the pipeline follow the reference design; the interval
// width of one unit, the index by the raw integer bits, the sigmoid default
// and the load port are this design's choices.
module activation_function
  import nna_pkg::*;
#(
  parameter int unsigned ENTRIES = 1 << INT_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  out_bus_t           in,
  output out_bus_t           out,
  // table load port
  input  logic               lut_we,
  input  logic [INT_W-1:0]   lut_addr,
  input  data_t              lut_level,
  input  data_t              lut_grad
);

  typedef struct packed {
    data_t level;
    data_t grad;
  } lut_entry_t;

  lut_entry_t lut [ENTRIES];

  // Q6.12 sample of the logistic function at integer point x
  function automatic data_t sigmoid_q(input int x);
    real y;
    y = 1.0 / (1.0 + $exp(-real'(x)));
    return data_t'($rtoi(y * real'(1 << FRAC_W) + 0.5));
  endfunction

  initial begin
    for (int k = 0; k < int'(ENTRIES); k++) begin
      int x;
      x = (k >= int'(ENTRIES) / 2) ? k - int'(ENTRIES) : k;   // signed integer part
      lut[k].level = sigmoid_q(x);
      lut[k].grad  = sigmoid_q(x + 1) - sigmoid_q(x);
    end
  end

  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_addr] <= '{level: lut_level, grad: lut_grad};
  end

  // Stage 1: table read
  lut_entry_t           e1;
  logic [FRAC_W-1:0]    fr1;
  logic                 v1;
  naddr_t               a1;

  always_ff @(posedge clk) begin
    e1  <= lut[in.data[DATA_W-1 -: INT_W]];
    fr1 <= in.data[FRAC_W-1:0];
    a1  <= in.addr;
  end

  // Stage 2: gradient x fraction
  logic signed [DATA_W+FRAC_W:0] prod;
  data_t  p2, lv2;
  logic   v2;
  naddr_t a2;

  always_comb begin
    prod = e1.grad * $signed({1'b0, fr1});
  end

  always_ff @(posedge clk) begin
    p2  <= data_t'(prod >>> FRAC_W);
    lv2 <= e1.level;
    a2  <= a1;
  end

  // Stage 3: level + interpolated rise
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      v2  <= 1'b0;
      out <= '0;
    end else begin
      v1        <= in.valid;
      v2        <= v1;
      out.valid <= v2;
      out.data  <= sat_data(ACC_W'(lv2) + ACC_W'(p2));
      out.addr  <= a2;
    end
  end

endmodule
