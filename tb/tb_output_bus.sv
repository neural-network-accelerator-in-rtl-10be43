// tb_output_bus: self-checking test of the shared output bus.
//
// Drives random request patterns from ten result registers and checks that
// exactly the lowest-numbered requesting block is granted, that its word
// (value and neuron address) is passed on, and that nothing is granted or
// passed when no block requests.
module tb_output_bus;
  import nna_pkg::*;

  localparam int unsigned N = 10;

  out_bus_t     res [N];
  logic [N-1:0] grant;
  out_bus_t     af_in;

  int checks = 0, failures = 0;

  output_bus #(.N(N)) dut (.res, .grant, .af_in);

  initial begin
    #100000;
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
    for (int t = 0; t < 2000; t++) begin
      int first;
      first = -1;
      for (int i = 0; i < int'(N); i++) begin
        res[i].valid = ($urandom_range(0, 4) == 0) || (t % 50 == 0 && i == N - 1);
        res[i].data  = data_t'($urandom);
        res[i].addr  = naddr_t'($urandom);
        if (t % 97 == 0) res[i].valid = 1'b0;
      end
      for (int i = int'(N) - 1; i >= 0; i--) if (res[i].valid) first = i;
      #1;
      if (first < 0) begin
        check(grant == '0, "no grant when idle");
        check(!af_in.valid, "no word when idle");
      end else begin
        check(grant == (N'(1) << first), $sformatf("grant %b exp block %0d", grant, first));
        check(af_in == res[first], "granted word passed on");
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
