// tb_computing_block: self-checking test of one computing block.
//
// Loads a random weight table, then streams neurons of random length (with
// random bubbles and words for other blocks, sel=0) over the input bus. The
// expected result is computed here from the same inputs: the exact sum of
// 36-bit products, shifted right by 12 and saturated to Q6.12. Checks the
// value, the neuron address (tag + BLOCK_ID), that res.valid rises exactly
// three clocks after the last word, that the result waits until granted and
// that deselected words are ignored. Includes sums large enough to saturate.
module tb_computing_block;
  import nna_pkg::*;

  localparam int unsigned ID    = 3;
  localparam int unsigned DEPTH = 256;

  logic     clk = 0, rst_n = 0;
  in_bus_t  bus;
  logic     sel, w_we, grant;
  wptr_t    w_addr;
  data_t    w_data;
  out_bus_t res;

  int checks = 0, failures = 0;
  data_t wref [DEPTH];

  computing_block #(.BLOCK_ID(ID), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .bus, .sel, .w_we, .w_addr, .w_data, .res, .grant);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic data_t rnd_data(input int big);
    if (big != 0) return data_t'($urandom_range(20000, 131071));   // ~5..32
    return data_t'(int'($urandom_range(0, 16383)) - 8192);          // -2..2
  endfunction

  // drive one bus word at the falling edge, sampled at the next rising edge
  task automatic put(input bit v, input bit s, input bit f, input bit l,
                     input data_t d, input wptr_t p, input naddr_t t);
    @(negedge clk);
    bus = '{valid: v, first: f, last: l, data: d, wptr: p, tag: t};
    sel = s;
  endtask

  initial begin
    bus = '0; sel = 0; w_we = 0; w_addr = '0; w_data = '0; grant = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // weight table
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      wref[i] = rnd_data(0);
      w_we = 1; w_addr = wptr_t'(i); w_data = wref[i];
    end
    @(negedge clk) w_we = 0;

    for (int n = 0; n < 40; n++) begin
      int len, wait_cyc, big, lat;
      logic signed [ACC_W-1:0] acc;
      data_t exp_v;
      naddr_t tag;
      wptr_t base;
      len  = $urandom_range(1, 30);
      big  = (n % 5 == 4) ? 1 : 0;
      tag  = naddr_t'($urandom_range(0, 1000));
      base = wptr_t'($urandom_range(0, DEPTH - 31));
      acc  = '0;
      for (int i = 0; i < len; i++) begin
        data_t d;
        // bubbles and words meant for other blocks are ignored
        if ($urandom_range(0, 3) == 0) put(1'b0, 1'b1, 1'b0, 1'b0, rnd_data(0), '0, '0);
        if ($urandom_range(0, 5) == 0) put(1'b1, 1'b0, 1'b1, 1'b1, rnd_data(0), '0, '0);
        d = rnd_data(big);
        if (big != 0) wref[int'(base) + i] = data_t'(30000);
        if (big != 0) begin
          // rewrite the weight through the load port first
          @(negedge clk);
          bus = '0; w_we = 1; w_addr = base + wptr_t'(i); w_data = wref[int'(base) + i];
          @(negedge clk) w_we = 0;
        end
        acc += ACC_W'(d) * ACC_W'(wref[int'(base) + i]);
        put(1'b1, 1'b1, i == 0, i == len - 1, d, base + wptr_t'(i), tag);
      end
      exp_v = sat_data(acc >>> FRAC_W);
      @(negedge clk) bus = '0;
      // latency: last word sampled at posedge k, res.valid visible after 3 edges
      lat = 1;
      while (!res.valid && lat < 10) begin @(negedge clk); lat++; end
      check(lat == int'(CB_LATENCY), $sformatf("latency %0d", lat));
      check(res.data == exp_v, $sformatf("neuron %0d data %0d exp %0d", n, res.data, exp_v));
      check(res.addr == tag + naddr_t'(ID), "neuron address");
      // result waits until granted
      wait_cyc = $urandom_range(0, 5);
      repeat (wait_cyc) @(negedge clk);
      check(res.valid, "result held until grant");
      grant = 1;
      @(negedge clk) grant = 0;
      check(!res.valid, "result register freed by grant");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
