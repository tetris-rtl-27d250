// tb_latency_counter: self-checking testbench for latency_counter.
// Random input pulses are injected into a stream of scaled-down frames
// (frame_start, then vsync_start a fixed time later). A reference records
// the input cycle, waits for the next frame start and the vsync after it,
// and predicts the count; last, worst and count are compared after each
// measurement, and inputs during a measurement must be ignored.
module tb_latency_counter;
  localparam int FRAME = 500, VS_AT = 420;
  logic clk = 0, rst_n = 0, start = 0, frame_start = 0, vsync_start = 0, done;
  logic [23:0] last, worst;
  logic [15:0] count;
  int checks = 0, failures = 0;
  longint cyc = 0, t0 = -1;
  int state = 0, e_last = 0, e_worst = 0, e_count = 0;

  latency_counter #(.W(24)) dut (.clk, .rst_n, .start, .frame_start, .vsync_start, .last, .worst, .count, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (e_count < 500) begin
      @(negedge clk);
      frame_start = (cyc % FRAME == 0);
      vsync_start = (cyc % FRAME == VS_AT);
      start = ($urandom_range(0, 300) == 0);
      @(posedge clk);
      case (state)
        0: if (start) begin t0 = cyc; state = 1; end
        1: if (frame_start) state = 2;
        default: if (vsync_start) begin
          e_last = int'(cyc - t0);
          if (e_last > e_worst) e_worst = e_last;
          e_count++;
          state = 0;
        end
      endcase
      cyc++;
      #1;
      if (done) begin
        check(last == 24'(e_last), $sformatf("last %0d want %0d", last, e_last));
        check(worst == 24'(e_worst), "worst");
        check(count == 16'(e_count), "count");
        check(last > VS_AT - FRAME + FRAME && last <= FRAME + VS_AT + 1, "latency within one to two frames");
      end
    end
    $display("worst latency %0d cycles", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
