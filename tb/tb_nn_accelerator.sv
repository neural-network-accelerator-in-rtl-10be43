// tb_nn_accelerator: end-to-end test of the accelerator at its default size
// (10 computing blocks, 1024 weights each, 1024 neuron values).
//
// A four-layer perceptron 16-23-12-25-4 with random weights is loaded through
// the host ports (weights laid out as the control logic expects: neuron n in
// block n mod 10, pass n / 10, weight of input i at w_base + pass*in_count + i)
// and run twice: first with the power-up sigmoid table, then, after a mode
// switch, with a clamped ramp loaded into the activation table. After each run
// every neuron value is read back through the data-output port and compared
// with a bit-exact model computed here. The test counts and requires each
// mechanism at least once: multi-pass layers, a partial pass, a stalled last
// input, the layer barrier, several results waiting for the output bus,
// saturation of a sum, and the activation-table reload. It also checks that
// the input bus carries one word per clock and bounds the run time.
module tb_nn_accelerator;
  import nna_pkg::*;

  localparam int NB = NUM_BLOCKS;
  localparam int NL = 4;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- network
  int in_base  [NL] = '{0, 100, 200, 300};
  int in_cnt   [NL] = '{16, 23, 12, 25};
  int out_base [NL] = '{100, 200, 300, 400};
  int out_cnt  [NL] = '{23, 12, 25, 4};
  int w_base   [NL];
  data_t W [NL][32][32];
  data_t val [1024];
  int lvl [64], grd [64];

  function automatic int sig_q(input int x);
    return $rtoi(4096.0 / (1.0 + $exp(-real'(x))) + 0.5);
  endfunction

  int saturations = 0;
  function automatic data_t act(input data_t x);
    int k, f;
    k = int'(x[17:12]);
    f = int'(x[11:0]);
    return data_t'(lvl[k] + ((grd[k] * f) >>> 12));
  endfunction

  // bit-exact reference of one run
  task automatic reference();
    for (int L = 0; L < NL; L++)
      for (int n = 0; n < out_cnt[L]; n++) begin
        longint s;
        s = 0;
        for (int i = 0; i < in_cnt[L]; i++) s += longint'(val[in_base[L] + i]) * longint'(W[L][n][i]);
        s = s >>> FRAC_W;
        if (s > 131071) begin s = 131071; saturations++; end
        if (s < -131072) begin s = -131072; saturations++; end
        val[out_base[L] + n] = act(data_t'(s));
      end
  endtask

  // ---------------------------------------------------------------- monitors
  int cyc = 0, stall_cyc = 0, barrier_cyc = 0, contention = 0, words = 0;
  int multipass = 0, partial = 0;
  always @(posedge clk) begin
    cyc++;
    if (stall) stall_cyc++;
    if (barrier) barrier_cyc++;
    if ($countones(dut.pending) > 1) contention++;
    if (dut.bus.valid) begin
      words++;
      if (dut.bus.first && dut.bus.tag != dut.u_ctrl.cur.out_base) multipass++;
      if (dut.bus.first && dut.sel != '1) partial++;
    end
  end

  task automatic run_and_check(input string name);
    int t0, exp_words;
    for (int a = 0; a < 16; a++) begin
      val[a] = data_t'(int'($urandom_range(0, 32767)) - 16384);   // -4..4
      @(negedge clk) in_we = 1; in_addr = naddr_t'(a); in_data = val[a];
    end
    @(negedge clk) in_we = 0;
    reference();
    words = 0; stall_cyc = 0; barrier_cyc = 0;
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    exp_words = 0;
    for (int L = 0; L < NL; L++) exp_words += ((out_cnt[L] + NB - 1) / NB) * in_cnt[L];
    check(words == exp_words, $sformatf("%s: %0d bus words, expected %0d", name, words, exp_words));
    check(cyc - t0 <= exp_words + stall_cyc + barrier_cyc + 20,
          $sformatf("%s: run took %0d cycles", name, cyc - t0));
    $display("%s: %0d cycles, %0d input words, %0d stall cycles, %0d barrier cycles",
             name, cyc - t0, words, stall_cyc, barrier_cyc);
    for (int L = 0; L < NL; L++)
      for (int n = 0; n < out_cnt[L]; n++) begin
        int a;
        a = out_base[L] + n;
        @(negedge clk) out_addr = naddr_t'(a);
        @(negedge clk) check(out_data == val[a], $sformatf("%s: neuron %0d = %0d, expected %0d", name, a, out_data, val[a]));
      end
  endtask

  int total_stalls = 0, total_barriers = 0, switches = 0;

  initial begin
    start = 0; w_we = 0; lut_we = 0; map_we = 0; in_we = 0;
    w_block = '0; w_addr = '0; w_data = '0; lut_addr = '0; lut_level = '0; lut_grad = '0;
    map_addr = '0; map_wdata = '0; in_addr = '0; in_data = '0; out_addr = '0;
    for (int i = 0; i < 1024; i++) val[i] = '0;
    for (int k = 0; k < 64; k++) begin
      int x;
      x = (k >= 32) ? k - 64 : k;
      lvl[k] = sig_q(x); grd[k] = sig_q(x + 1) - sig_q(x);
    end
    w_base[0] = 0;
    for (int L = 1; L < NL; L++) w_base[L] = w_base[L-1] + ((out_cnt[L-1] + NB - 1) / NB) * in_cnt[L-1];
    repeat (3) @(posedge clk);
    rst_n = 1;

    // network map
    for (int L = 0; L < NL; L++) begin
      @(negedge clk);
      map_we = 1; map_addr = MAW'(L);
      map_wdata = '{in_base: naddr_t'(in_base[L]), in_count: (NAW+1)'(in_cnt[L]),
                    out_base: naddr_t'(out_base[L]), out_count: (NAW+1)'(out_cnt[L]),
                    w_base: wptr_t'(w_base[L]), last: (L == NL - 1)};
    end
    @(negedge clk) map_we = 0;

    // weights: random -1..1, one large row so that some sums saturate
    for (int L = 0; L < NL; L++)
      for (int n = 0; n < out_cnt[L]; n++)
        for (int i = 0; i < in_cnt[L]; i++) begin
          W[L][n][i] = (L == 0 && n == 0) ? data_t'(16000) : data_t'(int'($urandom_range(0, 8191)) - 4096);
          @(negedge clk);
          w_we = 1; w_block = BLK_W'(n % NB);
          w_addr = wptr_t'(w_base[L] + (n / NB) * in_cnt[L] + i); w_data = W[L][n][i];
        end
    @(negedge clk) w_we = 0;

    run_and_check("sigmoid");
    total_stalls += stall_cyc; total_barriers += barrier_cyc;

    // mode switch: clamped ramp y = x/4 + 0.5 on [-2, 2]
    for (int k = 0; k < 64; k++) begin
      int x, y0, y1;
      x  = (k >= 32) ? k - 64 : k;
      y0 = 2048 + x * 1024; y1 = y0 + 1024;
      if (y0 < 0) y0 = 0; if (y0 > 4096) y0 = 4096;
      if (y1 < 0) y1 = 0; if (y1 > 4096) y1 = 4096;
      lvl[k] = y0; grd[k] = y1 - y0;
      @(negedge clk);
      lut_we = 1; lut_addr = INT_W'(k); lut_level = data_t'(y0); lut_grad = data_t'(y1 - y0);
    end
    @(negedge clk) lut_we = 0;
    switches++;

    run_and_check("ramp");
    total_stalls += stall_cyc; total_barriers += barrier_cyc;

    $display("multipass=%0d partial=%0d stalls=%0d barriers=%0d contention=%0d saturations=%0d switches=%0d",
             multipass, partial, total_stalls, total_barriers, contention, saturations, switches);
    check(multipass > 0, "multi-pass layer happened");
    check(partial > 0, "partial pass happened");
    check(total_stalls > 0, "stall happened");
    check(total_barriers > 0, "layer barrier happened");
    check(contention > 0, "output bus contention happened");
    check(saturations > 0, "saturation happened");
    check(switches > 0, "activation table switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
