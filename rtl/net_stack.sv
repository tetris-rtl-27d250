// net_stack: the Network subsystem (TSPIN link) of one board.
//
// Pins per board: a clock line (driven by the master, read by the slave),
// one handshake and four data lines out, and the same in. Master and slave
// differ only in the clock (IS_MASTER). Inside:
//   net_clock           bit timing, slave aligned to the master's clock
//   data_sender         own game data, once per frame, stop-and-wait
//   data_receiver       opponent's game data, de-duplicated, ACK requests
//   handshake_sender    ACKs for received data and control streams
//   handshake_receiver  ACKs for our data and control packets
//   net_control         ready / start / lost / won synchronization
// ACKs for data and control share the handshake line; an ACK carries the
// receiver's expected sequence number. Sequence numbers restart at the
// start of every battle. update_data should pulse once per frame.
module net_stack
  import net_pkg::*;
#(
  parameter bit IS_MASTER    = 1'b1,
  parameter int DIV          = 500,
  parameter int TIMEOUT_BITS = 64,
  parameter int TO_BITS      = 200
) (
  input  logic         clk,
  input  logic         rst_n,
  // pins
  output logic         net_clk_o,
  input  logic         net_clk_i,
  output logic         tx_h,
  output logic [3:0]   tx_d,
  input  logic         rx_h,
  input  logic [3:0]   rx_d,
  // game side
  input  logic         mp_ready,
  input  logic         lost,
  input  logic         update_data,
  input  logic [3:0]   hld,
  input  logic [5:0][3:0] pq,
  input  logic [799:0] pfd,
  input  logic         garbage_add,
  input  logic [3:0]   garbage,
  output logic         game_start,
  output logic         game_won,
  output logic         update_opponent_data,
  output logic [3:0]   opp_gbg,
  output logic [3:0]   opp_hld,
  output logic [5:0][3:0] opp_pq,
  output logic [799:0] opp_pfd,
  output logic [2:0]   ctrl_state,
  output logic [15:0]  resends,
  output logic [15:0]  dups
);
  logic tick_tx, tick_rx, in_game, ack_valid, ge_valid, ack_req, send_done;
  logic [3:0] ack_sn, exp_sn, sn;
  logic [1:0] hs_mode;
  logic [15:0] sends, hs_packets, hs_bad, data_errors;

  net_clock #(.DIV(DIV), .IS_MASTER(IS_MASTER)) u_clk (
    .clk, .rst_n, .clk_in(net_clk_i), .clk_out(net_clk_o), .tick_tx, .tick_rx);

  net_control #(.TO_BITS(TO_BITS)) u_ctrl (
    .clk, .rst_n, .tick(tick_tx), .mp_ready, .lost, .ack_valid, .ge_valid,
    .hs_mode, .game_start, .game_won, .in_game, .state(ctrl_state));

  data_sender #(.TIMEOUT_BITS(TIMEOUT_BITS)) u_dsend (
    .clk, .rst_n, .tick_tx, .enable(in_game), .reset_sn(game_start),
    .update_data, .hld, .pq, .pfd, .garbage_add(garbage_add && in_game), .garbage,
    .ack_valid(ack_valid && in_game), .ack_sn, .line(tx_d), .sn, .send_done, .sends, .resends);

  data_receiver u_drecv (
    .clk, .rst_n, .tick_rx, .reset_sn(game_start), .line_in(rx_d),
    .update_opponent_data, .opp_gbg, .opp_hld, .opp_pq, .opp_pfd,
    .ack_req, .exp_sn, .dups, .errors(data_errors));

  handshake_sender u_hsend (
    .clk, .rst_n, .tick_tx, .mode(hs_mode), .ack_req(ack_req && in_game), .rx_sn(exp_sn),
    .line(tx_h), .packets(hs_packets));

  handshake_receiver u_hrecv (
    .clk, .rst_n, .tick_rx, .line_in(rx_h), .ack_valid, .ack_sn, .ge_valid, .bad(hs_bad));

  logic unused;
  assign unused = ^{sn, send_done, sends, hs_packets, hs_bad, data_errors};
endmodule
