// tb_net_packets: self-checking testbench for the TSPIN packet layer:
// data_sender, data_receiver, handshake_sender and handshake_receiver.
// One direction of the link is built from them: the sender's four data
// lines go to the receiver, whose ACKs come back on a handshake line. Bit
// ticks are scaled to one per 20 clocks. Every "frame" the sender is given
// a fresh random game state and some garbage lines; the receiver must
// deliver every frame's state once, in order and intact, and the garbage
// total must arrive. A packet must arrive within its line time (8 sync
// bits + 242 stuffed bits on the longest line) plus a few ticks. The test
// then kills one data packet (line 0 held low) and one ACK (handshake line
// held low): the sender must time out and resend, and the duplicate that
// follows a lost ACK must be recognised and not delivered twice. Finally a
// stream of GE packets must be decoded as game-end and not as ACKs.
module tb_net_packets;
  import net_pkg::*;
  localparam int DIV = 20, FRAME = 16000;
  logic clk = 0, rst_n = 0;
  int ph = 0;
  logic tick_tx, tick_rx;
  logic update_data = 0, garbage_add = 0;
  logic [3:0] hld = 0, garbage = 0;
  logic [5:0][3:0] pq = 0;
  logic [799:0] pfd = 0;
  logic [3:0] line, line_rx, sn, opp_gbg, opp_hld, exp_sn, ack_sn;
  logic [5:0][3:0] opp_pq;
  logic [799:0] opp_pfd;
  logic send_done, upd, ack_req, hs_line, hs_rx, ack_valid, ge_valid;
  logic [15:0] sends, resends, dups, errors, hs_packets, bad;
  logic [1:0] hs_mode = 0;
  logic kill_data = 0, kill_hs = 0;
  int checks = 0, failures = 0;
  longint cyc = 0, t_upd;
  int n_frames = 0, n_deliv = 0, gbg_sent = 0, gbg_got = 0, worst_lat = 0, n_ge = 0;
  logic [835:0] frames_q[$];

  assign tick_tx = (ph == 0);
  assign tick_rx = (ph == DIV / 2);
  assign line_rx = kill_data ? {line[3:1], 1'b0} : line;
  assign hs_rx   = kill_hs ? 1'b0 : hs_line;

  data_sender #(.TIMEOUT_BITS(64)) snd (
    .clk, .rst_n, .tick_tx, .enable(1'b1), .reset_sn(1'b0), .update_data, .hld, .pq, .pfd, .garbage_add,
    .garbage, .ack_valid, .ack_sn, .line, .sn, .send_done, .sends, .resends);
  data_receiver #(.LIMIT_BITS(300)) rcv (
    .clk, .rst_n, .tick_rx, .reset_sn(1'b0), .line_in(line_rx), .update_opponent_data(upd), .opp_gbg, .opp_hld,
    .opp_pq, .opp_pfd, .ack_req, .exp_sn, .dups, .errors);
  handshake_sender #(.GAP_BITS(2)) hss (
    .clk, .rst_n, .tick_tx, .mode(hs_mode), .ack_req, .rx_sn(exp_sn), .line(hs_line), .packets(hs_packets));
  handshake_receiver hsr (
    .clk, .rst_n, .tick_rx, .line_in(hs_rx), .ack_valid, .ack_sn, .ge_valid, .bad);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    ph <= (ph == DIV - 1) ? 0 : ph + 1;
    cyc <= cyc + 1;
    if (rst_n && ge_valid) n_ge++;
    if (rst_n && upd) begin
      logic [835:0] e;
      n_deliv++;
      gbg_got += opp_gbg;
      if (cyc - t_upd > worst_lat) worst_lat = int'(cyc - t_upd);
      checks++;
      if (frames_q.size() == 0) begin
        failures++; $display("FAIL: delivery without a frame");
      end else begin
        e = frames_q.pop_front();
        if ({opp_hld, opp_pq, opp_pfd} != e[827:0] || opp_gbg != e[835:832]) begin
          failures++;
          $display("FAIL: frame %0d delivered wrong", n_deliv);
        end
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic frame(input int g, input bit expect_delivery);
    @(negedge clk);
    hld = 4'($urandom);
    for (int i = 0; i < 6; i++) pq[i] = 4'($urandom);
    for (int i = 0; i < 25; i++) pfd[i*32 +: 32] = $urandom;
    garbage = 4'(g);
    garbage_add = (g != 0);
    update_data = 1;
    t_upd = cyc;
    if (expect_delivery) frames_q.push_back({4'(g), 4'h0, hld, pq, pfd});
    gbg_sent += g;
    n_frames++;
    @(negedge clk);
    update_data = 0; garbage_add = 0;
    repeat (FRAME) @(negedge clk);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r0, d0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) frame($urandom_range(0, 4), 1);
    check(n_deliv == 20, $sformatf("20 frames delivered, got %0d", n_deliv));
    check(resends == 0 && dups == 0 && errors == 0, "clean link: no resends");
    $display("worst update-to-delivery latency %0d clocks = %0d bit times", worst_lat, worst_lat / DIV);
    check(worst_lat <= (SYNC_LEN + enc_len(212, K_DATA) + 4) * DIV, "packet within its line time");
    // lost data packet
    r0 = resends;
    fork
      frame(3, 1);
      begin
        repeat (3 * DIV) @(negedge clk);
        kill_data = 1;
        repeat (260 * DIV) @(negedge clk);
        kill_data = 0;
      end
    join
    check(resends > r0, "lost packet resent after the timeout");
    check(n_deliv == 21, "lost packet delivered by the resend");
    // lost ACK
    r0 = resends; d0 = dups;
    fork
      frame(2, 1);
      begin
        repeat (252 * DIV) @(negedge clk);
        kill_hs = 1;
        repeat (30 * DIV) @(negedge clk);
        kill_hs = 0;
      end
    join
    check(resends > r0 && dups > d0, "lost ACK: resend recognised as a duplicate");
    check(n_deliv == 22, "duplicate not delivered twice");
    frame(1, 1);
    check(n_deliv == 23 && frames_q.size() == 0, "link recovers");
    check(gbg_got == gbg_sent, $sformatf("garbage total %0d of %0d", gbg_got, gbg_sent));
    // game end packets
    @(negedge clk); hs_mode = 2;
    repeat (200 * DIV) @(negedge clk);
    hs_mode = 0;
    repeat (40 * DIV) @(negedge clk);
    check(n_ge > 5 && bad == 0, $sformatf("GE packets received (%0d)", n_ge));
    $display("sends %0d resends %0d dups %0d", sends, resends, dups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
