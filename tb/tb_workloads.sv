// tb_workloads: the accelerator at its default size running two workloads.
//
//  1. Handwritten-digit classifier, 64-50-10 perceptron (an 8x8 image in, ten
//     class scores out), run on three images back to back. Measures clock
//     cycles per image and the resulting images per second at 133 MHz, to be
//     held against the 336000 images/s (396 clocks) of the reference build.
//     The network size is this test's own assumption. The check is that a run
//     takes no more than the input words streamed (one per clock) plus, per
//     layer, the pipeline and drain time CB_LATENCY + AF_LATENCY + NB + 4.
//  2. Capacity: a 128-80 layer uses all 10 x 1024 = 10240 weight locations,
//     and its neurons occupy the top of the 1024-word memory (944..1023).
// Every neuron value is read back and compared with a bit-exact model.
module tb_workloads;
  import nna_pkg::*;

  localparam int NB = NUM_BLOCKS;

  logic clk = 0, rst_n = 0;
  logic start, busy, done, w_we, lut_we, map_we, in_we, stall, barrier;
  logic [BLK_W-1:0] w_block;
  wptr_t w_addr;
  data_t w_data, lut_level, lut_grad, in_data, out_data;
  logic [INT_W-1:0] lut_addr;
  logic [MAW-1:0] map_addr;
  map_entry_t map_wdata;
  naddr_t in_addr, out_addr;

  nn_accelerator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  // current network
  int nl;
  int in_base [4], in_cnt [4], out_base [4], out_cnt [4], w_base [4];
  data_t wimg [NB][WEIGHT_DEPTH];
  data_t val [1024];
  int lvl [64], grd [64];

  function automatic int sig_q(input int x);
    return $rtoi(4096.0 / (1.0 + $exp(-real'(x))) + 0.5);
  endfunction

  function automatic data_t act(input data_t x);
    int k, f;
    k = int'(x[17:12]);
    f = int'(x[11:0]);
    return data_t'(lvl[k] + ((grd[k] * f) >>> 12));
  endfunction

  task automatic reference();
    for (int L = 0; L < nl; L++)
      for (int n = 0; n < out_cnt[L]; n++) begin
        longint s;
        s = 0;
        for (int i = 0; i < in_cnt[L]; i++)
          s += longint'(val[in_base[L] + i]) *
               longint'(wimg[n % NB][w_base[L] + (n / NB) * in_cnt[L] + i]);
        s = s >>> FRAC_W;
        if (s > 131071) s = 131071;
        if (s < -131072) s = -131072;
        val[out_base[L] + n] = act(data_t'(s));
      end
  endtask

  task automatic load_network();
    w_base[0] = 0;
    for (int L = 1; L < nl; L++) w_base[L] = w_base[L-1] + ((out_cnt[L-1] + NB - 1) / NB) * in_cnt[L-1];
    for (int L = 0; L < nl; L++) begin
      @(negedge clk);
      map_we = 1; map_addr = MAW'(L);
      map_wdata = '{in_base: naddr_t'(in_base[L]), in_count: (NAW+1)'(in_cnt[L]),
                    out_base: naddr_t'(out_base[L]), out_count: (NAW+1)'(out_cnt[L]),
                    w_base: wptr_t'(w_base[L]), last: (L == nl - 1)};
    end
    @(negedge clk) map_we = 0;
    for (int L = 0; L < nl; L++)
      for (int n = 0; n < out_cnt[L]; n++)
        for (int i = 0; i < in_cnt[L]; i++) begin
          int a;
          a = w_base[L] + (n / NB) * in_cnt[L] + i;
          wimg[n % NB][a] = data_t'(int'($urandom_range(0, 2047)) - 1024);   // -0.25..0.25
          @(negedge clk);
          w_we = 1; w_block = BLK_W'(n % NB); w_addr = wptr_t'(a); w_data = wimg[n % NB][a];
        end
    @(negedge clk) w_we = 0;
  endtask

  // load inputs, run once, return cycles from start to done, check all neurons
  task automatic infer(input string name, output int cycles);
    int t0;
    for (int a = 0; a < in_cnt[0]; a++) begin
      val[in_base[0] + a] = data_t'($urandom_range(0, 4096));            // pixel 0..1
      @(negedge clk) in_we = 1; in_addr = naddr_t'(in_base[0] + a); in_data = val[in_base[0] + a];
    end
    @(negedge clk) in_we = 0;
    reference();
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    wait (done);
    cycles = cyc - t0;
    @(negedge clk);
    for (int L = 0; L < nl; L++)
      for (int n = 0; n < out_cnt[L]; n++) begin
        int a;
        a = out_base[L] + n;
        @(negedge clk) out_addr = naddr_t'(a);
        @(negedge clk) check(out_data == val[a], $sformatf("%s: neuron %0d = %0d, expected %0d", name, a, out_data, val[a]));
      end
  endtask

  initial begin
    int c;
    start = 0; w_we = 0; lut_we = 0; map_we = 0; in_we = 0;
    w_block = '0; w_addr = '0; w_data = '0; lut_addr = '0; lut_level = '0; lut_grad = '0;
    map_addr = '0; map_wdata = '0; in_addr = '0; in_data = '0; out_addr = '0;
    for (int i = 0; i < 1024; i++) val[i] = '0;
    for (int k = 0; k < 64; k++) begin
      int x;
      x = (k >= 32) ? k - 64 : k;
      lvl[k] = sig_q(x); grd[k] = sig_q(x + 1) - sig_q(x);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. digit classifier 64-50-10
    nl = 2;
    in_base = '{0, 64, 0, 0}; in_cnt  = '{64, 50, 0, 0};
    out_base = '{64, 114, 0, 0}; out_cnt = '{50, 10, 0, 0};
    load_network();
    for (int img = 0; img < 3; img++) begin
      infer($sformatf("digit%0d", img), c);
      $display("digit image %0d: %0d cycles, %0d images/s at 133 MHz, %0d MACs",
               img, c, 133000000 / c, 64 * 50 + 50 * 10);
      check(c <= 5 * 64 + 1 * 50 + 2 * int'(CB_LATENCY + AF_LATENCY + NB + 4),
            $sformatf("image took %0d cycles", c));
    end

    // 2. capacity: 128-80 fills every weight location
    nl = 1;
    in_base = '{0, 0, 0, 0}; in_cnt = '{128, 0, 0, 0};
    out_base = '{944, 0, 0, 0}; out_cnt = '{80, 0, 0, 0};
    load_network();
    check(w_base[0] + 8 * 128 == WEIGHT_DEPTH, "weight tables full");
    infer("capacity", c);
    $display("capacity run: 10240 synapses, %0d cycles, %0f MAC per clock", c, 10240.0 / real'(c));
    check(c <= 1024 + int'(CB_LATENCY + AF_LATENCY + NB + 4), $sformatf("capacity run took %0d cycles", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
