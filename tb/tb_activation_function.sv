// tb_activation_function: self-checking test of the interpolating activation.
//
// Part 1 streams random Q6.12 inputs back to back through the power-up table
// and compares every output with a model written here: sigmoid samples at the
// integers, level + (gradient * fraction >> 12). It also checks that every
// output is within 0.02 of the exact logistic function, that the neuron
// address travels with the value, and that the latency is three clocks with
// one result per clock. Part 2 loads a ramp (clamped to 0..1) through the
// table port and checks the new function.
module tb_activation_function;
  import nna_pkg::*;

  logic     clk = 0, rst_n = 0;
  out_bus_t in, out;
  logic     lut_we;
  logic [INT_W-1:0] lut_addr;
  data_t    lut_level, lut_grad;

  int checks = 0, failures = 0;
  data_t lvl [64], grd [64];

  activation_function dut (.clk, .rst_n, .in, .out, .lut_we, .lut_addr, .lut_level, .lut_grad);

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

  function automatic int sig_q(input int x);
    real e;
    e = $exp(-real'(x));
    return $rtoi(4096.0 / (1.0 + e) + 0.5);
  endfunction

  function automatic data_t model(input data_t x);
    int k, f;
    k = int'(x[17:12]);
    f = int'(x[11:0]);
    return data_t'(int'(lvl[k]) + ((int'(grd[k]) * f) >>> 12));
  endfunction

  // expected outputs in order of issue
  data_t  q_data [$];
  naddr_t q_addr [$];
  real    q_x    [$];
  int     issued_at [$];
  int     cyc = 0;
  bit     check_sig;

  always @(posedge clk) cyc++;

  // output monitor
  always @(negedge clk) if (rst_n && out.valid) begin
    data_t e; naddr_t a; real x; int t;
    e = q_data.pop_front(); a = q_addr.pop_front(); x = q_x.pop_front(); t = issued_at.pop_front();
    check(out.data == e, $sformatf("value %0d exp %0d", out.data, e));
    check(out.addr == a, "address");
    check(cyc - t == int'(AF_LATENCY), $sformatf("latency %0d", cyc - t));
    if (check_sig) begin
      real y;
      y = 1.0 / (1.0 + $exp(-x));
      check((real'(out.data) / 4096.0 - y) < 0.02 && (y - real'(out.data) / 4096.0) < 0.02,
            $sformatf("sigmoid error at x=%f", x));
    end
  end

  task automatic send(input data_t x);
    @(negedge clk);
    in.valid = 1; in.data = x; in.addr = naddr_t'($urandom_range(0, 1023));
    q_data.push_back(model(x)); q_addr.push_back(in.addr);
    q_x.push_back(real'(x) / 4096.0); issued_at.push_back(cyc);
  endtask

  initial begin
    in = '0; lut_we = 0; lut_addr = '0; lut_level = '0; lut_grad = '0;
    check_sig = 1;
    for (int k = 0; k < 64; k++) begin
      int x;
      x = (k >= 32) ? k - 64 : k;
      lvl[k] = data_t'(sig_q(x));
      grd[k] = data_t'(sig_q(x + 1) - sig_q(x));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(data_t'(0)); send(data_t'(-4096)); send(data_t'(131071)); send(data_t'(-131072));
    for (int i = 0; i < 300; i++) send(data_t'(int'($urandom_range(0, 65535)) - 32768));
    @(negedge clk) in = '0;
    repeat (6) @(negedge clk);
    check(q_data.size() == 0, "all outputs seen");

    // ramp: y = x/8 + 0.5 clamped to [0, 1]
    check_sig = 0;
    for (int k = 0; k < 64; k++) begin
      int x, y0, y1;
      x  = (k >= 32) ? k - 64 : k;
      y0 = 2048 + x * 512; y1 = y0 + 512;
      if (y0 < 0) y0 = 0; if (y0 > 4096) y0 = 4096;
      if (y1 < 0) y1 = 0; if (y1 > 4096) y1 = 4096;
      lvl[k] = data_t'(y0); grd[k] = data_t'(y1 - y0);
      @(negedge clk);
      lut_we = 1; lut_addr = 6'(k); lut_level = lvl[k]; lut_grad = grd[k];
    end
    @(negedge clk) lut_we = 0;
    for (int i = 0; i < 200; i++) send(data_t'(int'($urandom_range(0, 65535)) - 32768));
    @(negedge clk) in = '0;
    repeat (6) @(negedge clk);
    check(q_data.size() == 0, "all ramp outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
