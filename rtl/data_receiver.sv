// data_receiver: receiver for the four TSPIN data lines.
//
// FSM (IDLE, RECEIVE, WAIT):
//   IDLE     a sync word on any line -> RECEIVE
//   RECEIVE  collect the four line packets; once all are in, decode and
//            reassemble the 836-bit packet -> WAIT. If they are not all in
//            within LIMIT_BITS bit times the partial packet is dropped.
//   WAIT     one clock: a packet whose SN equals the expected SN is new:
//            its fields are delivered (update_opponent_data pulses, the
//            garbage count is valid with it) and the expected SN advances;
//            a packet with any other SN is a duplicate and only re-ACKed.
//            Either way an ACK carrying the expected SN is requested.
// Line code errors are counted but, as on the original link, the data is
// used anyway; there is no error correction.
module data_receiver
  import net_pkg::*;
#(
  parameter int LIMIT_BITS = 300
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick_rx,
  input  logic         reset_sn,
  input  logic [3:0]   line_in,
  output logic         update_opponent_data,
  output logic [3:0]   opp_gbg,
  output logic [3:0]   opp_hld,
  output logic [5:0][3:0] opp_pq,
  output logic [799:0] opp_pfd,
  output logic         ack_req,
  output logic [3:0]   exp_sn,
  output logic [15:0]  dups,
  output logic [15:0]  errors
);
  localparam int E0 = enc_len(208, K_DATA);
  localparam int E3 = enc_len(212, K_DATA);
  localparam int LW = $clog2(LIMIT_BITS + 1);
  typedef enum logic [1:0] {DR_IDLE, DR_RECEIVE, DR_WAIT} dr_state_t;
  dr_state_t st;

  logic [3:0] sync, valid, recv, got, err;
  logic [E0-1:0] d0, d1, d2;
  logic [E3-1:0] d3;
  logic [DATA_BITS-1:0] flat;
  data_pkt_t pkt;
  logic [LW-1:0] lim;
  logic drop;

  serial_rx #(.ENC(E0)) u_rx0 (.clk, .rst_n, .tick(tick_rx), .line_in(line_in[0]), .drop, .sync(sync[0]), .valid(valid[0]), .data(d0), .receiving(recv[0]));
  serial_rx #(.ENC(E0)) u_rx1 (.clk, .rst_n, .tick(tick_rx), .line_in(line_in[1]), .drop, .sync(sync[1]), .valid(valid[1]), .data(d1), .receiving(recv[1]));
  serial_rx #(.ENC(E0)) u_rx2 (.clk, .rst_n, .tick(tick_rx), .line_in(line_in[2]), .drop, .sync(sync[2]), .valid(valid[2]), .data(d2), .receiving(recv[2]));
  serial_rx #(.ENC(E3)) u_rx3 (.clk, .rst_n, .tick(tick_rx), .line_in(line_in[3]), .drop, .sync(sync[3]), .valid(valid[3]), .data(d3), .receiving(recv[3]));

  stuff_decode #(.RAW(208), .K(K_DATA)) u_d0 (.din(d0), .dout(flat[835:628]), .error(err[0]));
  stuff_decode #(.RAW(208), .K(K_DATA)) u_d1 (.din(d1), .dout(flat[627:420]), .error(err[1]));
  stuff_decode #(.RAW(208), .K(K_DATA)) u_d2 (.din(d2), .dout(flat[419:212]), .error(err[2]));
  stuff_decode #(.RAW(212), .K(K_DATA)) u_d3 (.din(d3), .dout(flat[211:0]),   .error(err[3]));

  assign pkt = flat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= DR_IDLE; got <= '0; lim <= '0; drop <= 1'b0;
      update_opponent_data <= 1'b0; opp_gbg <= '0; opp_hld <= '0; opp_pq <= '0; opp_pfd <= '0;
      ack_req <= 1'b0; exp_sn <= '0; dups <= '0; errors <= '0;
    end else begin
      update_opponent_data <= 1'b0;
      ack_req <= 1'b0;
      drop    <= 1'b0;
      if (reset_sn) exp_sn <= '0;
      unique case (st)
        DR_IDLE:
          if (sync != 0) begin
            st  <= DR_RECEIVE;
            got <= valid;
            lim <= '0;
          end
        DR_RECEIVE: begin
          got <= got | valid;
          if ((got | valid) == 4'hF) begin
            st <= DR_WAIT;
          end else if (tick_rx) begin
            if (lim == LW'(LIMIT_BITS - 1)) begin
              drop <= 1'b1;
              st   <= DR_IDLE;
            end else lim <= lim + 1'b1;
          end
        end
        default: begin  // DR_WAIT
          st      <= DR_IDLE;
          ack_req <= 1'b1;
          if (err != 0) errors <= errors + 16'd1;
          if (pkt.sn == exp_sn && !reset_sn) begin
            update_opponent_data <= 1'b1;
            opp_gbg <= pkt.gbg;
            opp_hld <= pkt.hld;
            opp_pq  <= pkt.pq;
            opp_pfd <= pkt.pfd;
            exp_sn  <= exp_sn + 4'd1;
          end else begin
            dups <= dups + 16'd1;
          end
        end
      endcase
    end
  end

  logic unused;
  assign unused = ^recv;
endmodule
