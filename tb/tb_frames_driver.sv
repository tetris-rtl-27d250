// tb_frames_driver: self-checking testbench for frames_driver.
// Counts frame_start pulses (including the wrap from 99999 to 0) against
// a reference count and checks the five-digit overlay pixel by pixel.
module tb_frames_driver;
  logic clk = 0, rst_n = 0, frame_start = 0, en = 1, active;
  logic [10:0] hcount = 0;
  logic [9:0]  vcount = 0;
  logic [16:0] frames;
  logic [23:0] rgb;
  int checks = 0, failures = 0, n = 0;

  `include "text_ref.svh"

  frames_driver #(.X(4), .Y(4), .SCALE_LOG2(1)) dut (.clk, .rst_n, .frame_start, .en, .hcount, .vcount,
                                                     .frames, .active, .rgb);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 100_400; i++) begin
      @(negedge clk);
      frame_start = ($urandom_range(0, 3) != 0) || i > 1000;
      @(posedge clk);
      if (frame_start) n = (n == 99999) ? 0 : n + 1;
      #1;
      if (i % 997 == 0 || (n < 30 && i > 99500)) begin
        checks++;
        if (frames != 17'(n)) begin failures++; $display("FAIL count %0d want %0d", frames, n); end
      end
    end
    @(negedge clk); frame_start = 0;
    for (int v = 0; v < 20; v++)
      for (int h = 0; h < 70; h++) begin
        hcount = 11'(h); vcount = 10'(v);
        #1;
        checks++;
        if (active != text_on($sformatf("%05d", n), 4, 4, 1, h, v)) failures++;
      end
    checks++;
    if (n > 1000) begin failures++; $display("FAIL: no wrap, n = %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
