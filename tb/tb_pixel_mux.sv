// tb_pixel_mux: self-checking testbench for pixel_mux.
// Random colours with at most one active driver: the output must be the
// active driver's colour, or the background colour when none is active.
module tb_pixel_mux;
  localparam int N = 11;
  logic [N-1:0] active;
  logic [N-1:0][23:0] rgb_in;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  pixel_mux #(.N(N), .BG(24'h123456)) dut (.active, .rgb_in, .rgb);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int a;
      for (int k = 0; k < N; k++) rgb_in[k] = 24'($urandom);
      a = $urandom_range(0, N);
      active = (a == N) ? '0 : (N'(1) << a);
      #1;
      checks++;
      if (rgb != ((a == N) ? 24'h123456 : rgb_in[a])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
