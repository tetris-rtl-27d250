// tb_seven_bag: self-checking testbench for seven_bag.
// The consumer takes pieces whenever one is valid (and, in a second phase,
// only at random). Every run of seven consecutive pieces taken from the
// start must be a permutation of the seven tetrominoes, pieces must be
// codes 1..7, and a new piece must become available within a bounded
// number of cycles (the draw is retried every cycle).
module tb_seven_bag;
  import tetris_pkg::*;
  logic clk = 0, rst_n = 0, ready = 0, valid;
  tile_t piece;
  int checks = 0, failures = 0;
  int n = 0, wait_cyc = 0, worst_wait = 0;
  logic [7:0] seen;

  seven_bag dut (.clk, .rst_n, .ready, .valid, .piece);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; n < 7 * 300; cyc++) begin
      @(negedge clk);
      ready = (n < 7 * 150) ? 1'b1 : ($urandom_range(0, 1) == 1);
      if (valid && ready) begin
        check(piece >= T_I && piece <= T_Z, "piece code");
        check(!seen[piece], $sformatf("duplicate %0d in bag %0d", piece, n / 7));
        seen[piece] = 1'b1;
        n++;
        if (n % 7 == 0) begin
          check(seen[7:1] == 7'h7F, "bag complete");
          seen = '0;
        end
        if (wait_cyc > worst_wait) worst_wait = wait_cyc;
        wait_cyc = 0;
      end else if (ready) begin
        wait_cyc++;
      end
      if (!valid) check(piece == T_EMPTY, "no piece when invalid");
    end
    $display("worst wait for a piece: %0d cycles", worst_wait);
    check(worst_wait < 200, "piece available within 200 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
