// tb_garbage_queue: self-checking testbench for garbage_queue.
// Random incoming attacks and takes are compared with a queue model: each
// attack waits DELAY_CYCLES (scaled down here) before it is offered, the
// total pending never exceeds 12 lines (excess is dropped), batches leave
// in arrival order, and `clear` empties the queue. The delay is checked to
// the cycle. Room for an attack is judged on the pending count before a
// take in the same cycle.
module tb_garbage_queue;
  localparam int D = 40;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, take = 0;
  logic [3:0] in_lines = 0, ready_lines, pending;
  int checks = 0, failures = 0, n_sat = 0, n_take = 0;
  int m_cnt[$], m_age[$];

  garbage_queue #(.MAX_LINES(12), .DELAY_CYCLES(D)) dut (.clk, .rst_n, .clear, .in_valid, .in_lines,
                                                         .take, .ready_lines, .pending);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int m_pending();
    int s = 0;
    foreach (m_cnt[i]) s += m_cnt[i];
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int e_ready;
      @(negedge clk);
      e_ready = (m_cnt.size() != 0 && m_age[0] >= D) ? m_cnt[0] : 0;
      check(ready_lines == 4'(e_ready), $sformatf("ready %0d want %0d", ready_lines, e_ready));
      check(pending == 4'(m_pending()), $sformatf("pending %0d want %0d", pending, m_pending()));
      in_valid = ($urandom_range(0, 30) == 0);
      in_lines = 4'($urandom_range(0, 6));
      take     = ($urandom_range(0, 3) == 0);
      clear    = (i % 5000 == 4999);
      @(posedge clk);
      if (clear) begin
        m_cnt.delete(); m_age.delete();
      end else begin
        bit dt;
        int add;
        dt = take && e_ready != 0;
        foreach (m_age[k]) if (m_age[k] <= D) m_age[k]++;
        add = 12 - m_pending();   // room is judged before this cycle's take
        if (dt) begin void'(m_cnt.pop_front()); void'(m_age.pop_front()); n_take++; end
        if (int'(in_lines) < add) add = in_lines;
        else if (in_valid && in_lines != 0) n_sat++;
        if (in_valid && add != 0) begin m_cnt.push_back(add); m_age.push_back(0); end
      end
    end
    // exact delay: one attack into an empty queue
    @(negedge clk); clear = 1; in_valid = 0; take = 0;
    @(negedge clk); clear = 0; in_valid = 1; in_lines = 3;
    @(negedge clk); in_valid = 0;
    for (int c = 0; c < D; c++) begin
      check(ready_lines == 0, "not ready before the delay");
      @(negedge clk);
    end
    check(ready_lines == 3, $sformatf("ready exactly %0d cycles after arrival", D));
    check(n_sat > 10 && n_take > 100, "saturation and takes exercised");
    $display("saturated %0d, taken %0d", n_sat, n_take);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
