// tb_lfsr31: self-checking testbench for lfsr31.
// A reference Galois LFSR (x^31 + x^28 + 1) is stepped alongside the DUT
// and compared every cycle, including cycles with en low. The test also
// checks that the seed is loaded on reset and that a zero seed becomes 1.
module tb_lfsr31;
  logic clk = 0, rst_n = 0, en = 0;
  logic bit_out, bit_z;
  logic [30:0] state, state_z, ref_s;
  int checks = 0, failures = 0;

  lfsr31 #(.SEED(31'h2545_F491)) dut (.clk, .rst_n, .en, .bit_out, .state);
  lfsr31 #(.SEED(31'h0)) dut_z (.clk, .rst_n, .en, .bit_out(bit_z), .state(state_z));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_s = 31'h2545_F491;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == 31'h2545_F491, "seed after reset");
    check(state_z == 31'h1, "zero seed replaced by 1");
    for (int i = 0; i < 5000; i++) begin
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) ref_s = ref_s[0] ? ((ref_s >> 1) ^ 31'h4800_0000) : (ref_s >> 1);
      @(negedge clk);
      check(state == ref_s && bit_out == ref_s[0], "sequence");
      check(state != 0, "never zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
