// tb_piece_queue: self-checking testbench for piece_queue (6-entry
// preview FIFO). Random pushes and pops are checked against a queue model:
// the head, the valid flag, the full flag and all six preview slots. The
// model also checks that a push into a full queue is ignored unless a pop
// happens in the same cycle.
module tb_piece_queue;
  import tetris_pkg::*;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, head_valid;
  tile_t push_piece = T_EMPTY, head;
  logic [5:0][3:0] preview;
  int checks = 0, failures = 0;
  tile_t m[$];
  int full_pushes = 0;

  piece_queue #(.DEPTH(6)) dut (.clk, .rst_n, .push, .push_piece, .full, .pop, .head,
                                .head_valid, .preview);

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
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(head_valid == (m.size() != 0), "head_valid");
      check(full == (m.size() == 6), "full");
      if (m.size() != 0) check(head == m[0], "head");
      for (int k = 0; k < 6; k++)
        check(preview[k] == ((k < m.size()) ? 4'(m[k]) : 4'd0), $sformatf("preview %0d", k));
      push = ($urandom_range(0, 2) != 0);
      pop  = ($urandom_range(0, 2) == 0);
      push_piece = tile_t'($urandom_range(1, 7));
      @(posedge clk);
      begin
        bit dp, du;
        dp = pop && m.size() != 0;
        du = push && (m.size() < 6 || dp);
        if (push && m.size() == 6) full_pushes++;
        if (dp) void'(m.pop_front());
        if (du) m.push_back(push_piece);
      end
    end
    check(full_pushes > 0, "full queue exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
