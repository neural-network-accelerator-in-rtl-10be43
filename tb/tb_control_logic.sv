// tb_control_logic: self-checking test of the sequencer and network map.
//
// The control logic runs here with four computing blocks that are modelled in
// the testbench: a one-clock memory, result registers that fill three clocks
// after a last input and drain one per clock lowest-first, and a three-clock
// activation stage that writes a marker value (3 * address + 1) back into
// memory. A three-layer map exercises multi-pass layers, a partial last pass,
// the layer barrier and the stall for very short layers. The expected bus
// words (data, weight pointer, tag, first/last, block select) are generated
// here from the map and compared in order; it also checks that a result is
// never overwritten, that a layer reads only completed results, that a long
// pass streams one input per clock, and that done comes after the last write.
module tb_control_logic;
  import nna_pkg::*;

  localparam int unsigned NB = 4;

  logic clk = 0, rst_n = 0;
  logic start, busy, done, map_we, in_we, ld_we, mem_written, stall, barrier;
  logic [MAW-1:0] map_addr;
  map_entry_t map_wdata;
  naddr_t in_addr, out_addr, ld_addr, mem_raddr;
  data_t in_data, out_data, ld_data, mem_rdata;
  in_bus_t bus;
  logic [NB-1:0] sel, res_pending;

  control_logic #(.NB(NB)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ environment
  data_t mem [1024];
  typedef struct { bit v; logic [NB-1:0] s; naddr_t t; } lastw_t;
  lastw_t s1, s2;
  naddr_t tags [NB];
  bit     af_v [3];
  naddr_t af_a [3];
  int     writes = 0, cyc = 0, stalls = 0, barriers = 0;

  always @(posedge clk) begin
    logic [NB-1:0] g, pend_n;
    int gi;
    cyc++;
    if (stall) stalls++;
    if (barrier) barriers++;
    // memory port A (host load or activation write) and port B
    if (ld_we) mem[ld_addr] = ld_data;
    if (af_v[2]) begin mem[af_a[2]] = data_t'(3 * int'(af_a[2]) + 1); writes++; end
    mem_rdata <= mem[mem_raddr];
    // activation pipeline, fed by the granted result
    gi = -1;
    for (int k = NB - 1; k >= 0; k--) if (res_pending[k]) gi = k;
    af_v[2] = af_v[1]; af_a[2] = af_a[1];
    af_v[1] = af_v[0]; af_a[1] = af_a[0];
    af_v[0] = (gi >= 0); af_a[0] = (gi >= 0) ? tags[gi] : '0;
    mem_written <= af_v[2];
    pend_n = res_pending;
    if (gi >= 0) pend_n[gi] = 1'b0;
    // result registers fill three clocks after the last word
    if (s2.v) begin
      check((pend_n & s2.s) == '0, "result register overwritten");
      pend_n |= s2.s;
      for (int k = 0; k < int'(NB); k++) if (s2.s[k]) tags[k] = s2.t + naddr_t'(k);
    end
    res_pending <= pend_n;
    s2 = s1;
    s1 = '{v: bus.valid && bus.last, s: sel, t: bus.tag};
  end

  // ------------------------------------------------------------ expected words
  typedef struct { data_t d; wptr_t w; naddr_t t; bit f, l; logic [NB-1:0] s; int layer; } word_t;
  word_t exp_q [$];
  map_entry_t m [3];
  int layer_writes [3];

  initial begin
    m[0] = '{in_base: 10'd0,   in_count: 11'd20, out_base: 10'd100, out_count: 11'd10, w_base: 10'd5,  last: 1'b0};
    m[1] = '{in_base: 10'd100, in_count: 11'd10, out_base: 10'd200, out_count: 11'd6,  w_base: 10'd300, last: 1'b0};
    m[2] = '{in_base: 10'd200, in_count: 11'd2,  out_base: 10'd300, out_count: 11'd9,  w_base: 10'd0,  last: 1'b1};
    for (int L = 0; L < 3; L++) begin
      for (int nb = 0; nb < int'(m[L].out_count); nb += NB) begin
        for (int i = 0; i < int'(m[L].in_count); i++) begin
          word_t w;
          int a;
          a   = int'(m[L].in_base) + i;
          w.d = (L == 0) ? data_t'(a * 7 - 50) : data_t'(3 * a + 1);
          w.w = wptr_t'(int'(m[L].w_base) + (nb / NB) * int'(m[L].in_count) + i);
          w.t = naddr_t'(int'(m[L].out_base) + nb);
          w.f = (i == 0); w.l = (i == int'(m[L].in_count) - 1);
          w.s = '0;
          for (int k = 0; k < int'(NB); k++) w.s[k] = (nb + k < int'(m[L].out_count));
          w.layer = L;
          exp_q.push_back(w);
        end
      end
    end
  end

  // bus monitor
  int prev_layer = 0, pass_start = 0, words_seen = 0;
  int writes_before_layer [3];
  always @(negedge clk) if (rst_n && bus.valid) begin
    word_t w;
    check(exp_q.size() > 0, "unexpected bus word");
    if (exp_q.size() > 0) begin
      w = exp_q.pop_front();
      words_seen++;
      check(bus.data == w.d, $sformatf("data %0d exp %0d", bus.data, w.d));
      check(bus.wptr == w.w, $sformatf("wptr %0d exp %0d", bus.wptr, w.w));
      check(bus.tag == w.t && bus.first == w.f && bus.last == w.l && sel == w.s, "tag/first/last/sel");
      if (w.layer != prev_layer) begin
        // every neuron of the previous layer is already in memory
        check(writes == ((w.layer == 1) ? 10 : 16), $sformatf("barrier: %0d writes", writes));
        prev_layer = w.layer;
      end
      if (w.f) pass_start = cyc;
      if (w.l && w.layer == 0) check(cyc - pass_start == 19, "layer 0 pass streams one input per clock");
    end
  end

  initial begin
    start = 0; map_we = 0; map_addr = '0; map_wdata = '0; in_we = 0; in_addr = '0; in_data = '0;
    out_addr = '0; res_pending = '0; mem_written = 0; s1 = '{v: 0, s: '0, t: '0}; s2 = s1;
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    for (int i = 0; i < 3; i++) begin af_v[i] = 0; af_a[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int L = 0; L < 3; L++) begin
      @(negedge clk) map_we = 1; map_addr = MAW'(L); map_wdata = m[L];
    end
    @(negedge clk) map_we = 0;
    for (int a = 0; a < 20; a++) begin
      @(negedge clk) in_we = 1; in_addr = naddr_t'(a); in_data = data_t'(a * 7 - 50);
    end
    @(negedge clk) in_we = 0;
    // host read path while idle
    @(negedge clk) out_addr = naddr_t'(4);
    @(negedge clk) check(out_data == data_t'(4 * 7 - 50), "host read while idle");
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(busy, "busy after start");
    wait (done);
    @(negedge clk);
    check(writes == 25, $sformatf("all neurons written: %0d", writes));
    check(exp_q.size() == 0, $sformatf("all bus words seen, %0d left", exp_q.size()));
    check(!busy, "idle after done");
    check(stalls > 0, "stall for the short layer happened");
    check(barriers > 0, "layer barrier happened");
    @(negedge clk) out_addr = naddr_t'(305);
    @(negedge clk) check(out_data == data_t'(3 * 305 + 1), "result read back");
    $display("words=%0d stalls=%0d barrier_cycles=%0d", words_seen, stalls, barriers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
