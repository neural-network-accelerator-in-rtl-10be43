// tb_result_memory: self-checking test of the dual-port neuron memory.
//
// Writes random words at random addresses while reading others in the same
// cycles, keeping a reference copy here. Checks the one-clock read latency,
// read-first behaviour when both ports hit one address, and that the RAM
// starts cleared.
module tb_result_memory;
  import nna_pkg::*;

  logic   clk = 0;
  logic   we;
  naddr_t waddr, raddr;
  data_t  wdata, rdata;

  int checks = 0, failures = 0;
  data_t ref_mem [1024];

  result_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < 1024; i++) ref_mem[i] = '0;
    // starts cleared
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) raddr = naddr_t'($urandom_range(0, 1023));
      @(negedge clk) check(rdata == '0, "cleared at power-up");
    end
    for (int i = 0; i < 4000; i++) begin
      data_t exp_r;
      @(negedge clk);
      we    = 1'($urandom_range(0, 1));
      waddr = naddr_t'($urandom_range(0, 63));
      wdata = data_t'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : naddr_t'($urandom_range(0, 63));
      exp_r = ref_mem[raddr];             // read-first
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1 check(rdata == exp_r, $sformatf("read %0d", raddr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
