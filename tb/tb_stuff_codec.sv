// tb_stuff_codec: self-checking testbench for stuff_encode and
// stuff_decode at both sizes the link uses: the 8-bit header with a zero
// after every 2 bits (12 bits on the line) and a 208-bit data chunk with a
// zero after every 7 bits (237 bits). Random words are encoded, checked
// against a reference encoder, checked never to contain eight ones in a
// row (so they cannot imitate the sync word), and decoded back. Setting a
// stuffed bit must raise the decoder's error flag.
module tb_stuff_codec;
  localparam int R1 = 8, K1 = 2, E1 = 12;
  localparam int R2 = 208, K2 = 7, E2 = 237;
  logic [R1-1:0] d1, q1;
  logic [E1-1:0] e1, e1x;
  logic [R2-1:0] d2, q2;
  logic [E2-1:0] e2, e2x;
  logic err1, err2, err1x, err2x;
  int checks = 0, failures = 0;

  stuff_encode #(.RAW(R1), .K(K1), .ENC(E1)) enc1 (.din(d1), .dout(e1));
  stuff_decode #(.RAW(R1), .K(K1), .ENC(E1)) dec1 (.din(e1), .dout(q1), .error(err1));
  stuff_decode #(.RAW(R1), .K(K1), .ENC(E1)) dec1x (.din(e1x), .dout(), .error(err1x));
  stuff_encode #(.RAW(R2), .K(K2), .ENC(E2)) enc2 (.din(d2), .dout(e2));
  stuff_decode #(.RAW(R2), .K(K2), .ENC(E2)) dec2 (.din(e2), .dout(q2), .error(err2));
  stuff_decode #(.RAW(R2), .K(K2), .ENC(E2)) dec2x (.din(e2x), .dout(), .error(err2x));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // reference: bits MSB first, a 0 inserted after every k data bits
  function automatic bit ref_ok(logic [R2-1:0] d, int raw, int k, logic [E2-1:0] e, int enc);
    int o = enc - 1;
    for (int i = raw - 1; i >= 0; i--) begin
      if (e[o] != d[i]) return 0;
      o--;
      if ((raw - i) % k == 0) begin
        if (e[o] != 0) return 0;
        o--;
      end
    end
    return o == -1;
  endfunction

  function automatic int longest_ones(logic [E2-1:0] e, int n);
    int run = 0, best = 0;
    for (int i = n - 1; i >= 0; i--) begin
      run = e[i] ? run + 1 : 0;
      if (run > best) best = run;
    end
    return best;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int pos;
      d1 = 8'($urandom);
      for (int w = 0; w < 7; w++) d2[w*32 +: 32] = (t % 10 == 0) ? '1 : $urandom;
      if (t == 0) begin d1 = '1; d2 = '1; end
      #1;
      check(ref_ok(R2'(d1), R1, K1, E2'(e1), E1), "header encoding");
      check(ref_ok(d2, R2, K2, e2, E2), "data encoding");
      check(q1 == d1 && !err1, "header round trip");
      check(q2 == d2 && !err2, "data round trip");
      check(longest_ones(E2'(e1), E1) <= K1 && longest_ones(e2, E2) <= K2, "no sync imitation");
      // set one stuffed bit
      pos = E1 - (K1 + 1) * $urandom_range(1, R1 / K1);
      e1x = e1; e1x[pos] = 1'b1;
      pos = E2 - (K2 + 1) * $urandom_range(1, R2 / K2);
      e2x = e2; e2x[pos] = 1'b1;
      #1;
      check(err1x && err2x, "stuff violation detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
