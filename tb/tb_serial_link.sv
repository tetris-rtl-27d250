// tb_serial_link: self-checking testbench for serial_tx and serial_rx.
// A transmitter sends random stuffed 12-bit words, one bit per tick, into
// a receiver sampling half a bit later, as on the real link. Checks: each
// word arrives intact with one sync pulse; the transfer takes 8 sync bits
// plus the word (20 ticks) from start to done; the line idles low; `drop`
// abandons a reception; and a line that is only noise without eight ones
// in a row never produces a word.
module tb_serial_link;
  localparam int ENC = 12, DIV = 20;
  logic clk = 0, rst_n = 0, start = 0, drop = 0;
  logic [ENC-1:0] payload, data;
  logic line, busy, done, sync, valid, receiving, tick_tx, tick_rx, noise_mode = 0, noise = 0, rx_line;
  int checks = 0, failures = 0, ph = 0, n_sync = 0, n_valid = 0;
  longint cyc = 0, t_start;
  logic [ENC-1:0] last_word;

  serial_tx #(.ENC(ENC)) tx (.clk, .rst_n, .tick(tick_tx), .start, .payload, .line, .busy, .done);
  serial_rx #(.ENC(ENC)) rx (.clk, .rst_n, .tick(tick_rx), .line_in(rx_line), .drop, .sync, .valid, .data,
                             .receiving);

  assign rx_line = noise_mode ? noise : line;
  assign tick_tx = (ph == 0);
  assign tick_rx = (ph == DIV / 2);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    ph <= (ph == DIV - 1) ? 0 : ph + 1;
    cyc <= cyc + 1;
    if (rst_n && sync) n_sync++;
    if (rst_n && valid) begin n_valid++; last_word <= data; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [ENC-1:0] w;
      int s0;
      w = 12'($urandom) & 12'b110110110110;   // stuffed: every third bit zero
      s0 = n_sync;
      @(negedge clk);
      payload = w; start = 1;
      @(negedge clk);
      start = 0;
      t_start = cyc;
      while (!done) @(negedge clk);
      check((cyc - t_start + DIV - 1) / DIV == ENC + 9, $sformatf("transfer took %0d ticks", (cyc - t_start) / DIV));
      check(line == 0, "line idles low");
      check(n_valid == s0 + 1 && last_word == w, $sformatf("received %h want %h", data, w));
      check(n_sync == s0 + 1, "one sync per word");
      repeat ($urandom_range(0, 3 * DIV)) @(negedge clk);
    end
    // drop in the middle of a word
    begin
      int v0;
      v0 = n_valid;
      @(negedge clk); payload = 12'h6db; start = 1;
      @(negedge clk); start = 0;
      repeat (14 * DIV) @(negedge clk);
      check(receiving, "receiving mid-word");
      drop = 1;
      @(negedge clk); drop = 0;
      while (busy) @(negedge clk);
      repeat (3 * DIV) @(negedge clk);
      check(n_valid == v0, "dropped word not delivered");
    end
    // noise without a sync word
    begin
      int v0, run;
      v0 = n_valid;
      run = 0;
      noise_mode = 1;
      for (int b = 0; b < 3000; b++) begin
        bit nb = $urandom_range(0, 1);
        if (nb) run++; else run = 0;
        if (run > 6) begin nb = 0; run = 0; end
        noise = nb;
        repeat (DIV) @(negedge clk);
      end
      check(n_valid == v0, "noise without sync ignored");
      noise_mode = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
