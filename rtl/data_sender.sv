// data_sender: stop-and-wait sender for the four TSPIN data lines.
//
// Game side: update_data (once per frame) snapshots hold piece, preview and
// playfield and marks fresh data; garbage_add adds outgoing garbage lines to
// an accumulator (saturating at 15) so that none is lost between packets.
//
// FSM (IDLE, SEND, WAIT):
//   IDLE  with fresh data and `enable`: build the 836-bit packet
//         {SN, GBG, HLD, PQ, PFD}, moving the accumulated garbage into it,
//         encode each quarter and start the four line senders -> SEND
//   SEND  all four lines finished (send_done) -> WAIT, timeout cleared
//   WAIT  ACK whose SN is our SN + 1 (the receiver now expects the next
//         packet) -> SN + 1, IDLE; TIMEOUT_BITS bit times without it ->
//         SEND the same packet again
// A matching ACK that arrives while a resend is still on the wire is
// remembered and honoured when the resend ends. Duplicate ACKs are
// ignored. The packet layout and stop-and-wait rules follow the protocol;
// the timeout length is this design's choice.
module data_sender
  import net_pkg::*;
#(
  parameter int TIMEOUT_BITS = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick_tx,
  input  logic         enable,
  input  logic         reset_sn,
  input  logic         update_data,
  input  logic [3:0]   hld,
  input  logic [5:0][3:0] pq,
  input  logic [799:0] pfd,
  input  logic         garbage_add,
  input  logic [3:0]   garbage,
  input  logic         ack_valid,
  input  logic [3:0]   ack_sn,
  output logic [3:0]   line,
  output logic [3:0]   sn,
  output logic         send_done,
  output logic [15:0]  sends,
  output logic [15:0]  resends
);
  typedef enum logic [1:0] {DS_IDLE, DS_SEND, DS_WAIT} ds_state_t;
  ds_state_t st;

  localparam int E0 = enc_len(208, K_DATA);
  localparam int E3 = enc_len(212, K_DATA);
  localparam int TW = $clog2(TIMEOUT_BITS + 1);

  data_pkt_t      pkt;
  logic [3:0]     snap_hld;
  logic [5:0][3:0] snap_pq;
  logic [799:0]   snap_pfd;
  logic           fresh, acked, start;
  logic [4:0]     acc;
  logic [TW-1:0]  tcnt;
  logic [3:0]     busy, done;
  logic [E0-1:0]  enc0, enc1, enc2;
  logic [E3-1:0]  enc3;
  logic [DATA_BITS-1:0] flat;

  assign flat = pkt;

  stuff_encode #(.RAW(208), .K(K_DATA)) u_e0 (.din(flat[835:628]), .dout(enc0));
  stuff_encode #(.RAW(208), .K(K_DATA)) u_e1 (.din(flat[627:420]), .dout(enc1));
  stuff_encode #(.RAW(208), .K(K_DATA)) u_e2 (.din(flat[419:212]), .dout(enc2));
  stuff_encode #(.RAW(212), .K(K_DATA)) u_e3 (.din(flat[211:0]),   .dout(enc3));

  serial_tx #(.ENC(E0)) u_tx0 (.clk, .rst_n, .tick(tick_tx), .start, .payload(enc0), .line(line[0]), .busy(busy[0]), .done(done[0]));
  serial_tx #(.ENC(E0)) u_tx1 (.clk, .rst_n, .tick(tick_tx), .start, .payload(enc1), .line(line[1]), .busy(busy[1]), .done(done[1]));
  serial_tx #(.ENC(E0)) u_tx2 (.clk, .rst_n, .tick(tick_tx), .start, .payload(enc2), .line(line[2]), .busy(busy[2]), .done(done[2]));
  serial_tx #(.ENC(E3)) u_tx3 (.clk, .rst_n, .tick(tick_tx), .start, .payload(enc3), .line(line[3]), .busy(busy[3]), .done(done[3]));

  logic ack_ok;
  assign ack_ok = ack_valid && (ack_sn == sn + 4'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= DS_IDLE; pkt <= '0; snap_hld <= '0; snap_pq <= '0; snap_pfd <= '0;
      fresh <= 1'b0; acked <= 1'b0; start <= 1'b0; acc <= '0; tcnt <= '0;
      sn <= '0; send_done <= 1'b0; sends <= '0; resends <= '0;
    end else begin
      start     <= 1'b0;
      send_done <= 1'b0;
      if (update_data) begin
        snap_hld <= hld;
        snap_pq  <= pq;
        snap_pfd <= pfd;
        fresh    <= 1'b1;
      end
      if (garbage_add) acc <= (5'(acc) + 5'(garbage) > 5'd15) ? 5'd15 : acc + 5'(garbage);
      if (reset_sn) begin
        sn <= '0;
        st <= DS_IDLE;
        acc <= '0;
      end else begin
        unique case (st)
          DS_IDLE:
            if (enable && fresh) begin
              pkt.sn  <= sn;
              pkt.gbg <= acc[3:0];
              pkt.hld <= snap_hld;
              pkt.pq  <= snap_pq;
              pkt.pfd <= snap_pfd;
              acc     <= garbage_add ? 5'(garbage) : '0;
              fresh   <= update_data;
              acked   <= 1'b0;
              start   <= 1'b1;
              sends   <= sends + 16'd1;
              st      <= DS_SEND;
            end
          DS_SEND: begin
            if (ack_ok) acked <= 1'b1;
            if (!start && busy == 4'b0000) begin
              send_done <= 1'b1;
              tcnt      <= '0;
              if (acked || ack_ok) begin
                sn <= sn + 4'd1;
                st <= DS_IDLE;
              end else begin
                st <= DS_WAIT;
              end
            end
          end
          default: begin  // DS_WAIT
            if (ack_ok) begin
              sn <= sn + 4'd1;
              st <= DS_IDLE;
            end else if (!enable) begin
              st <= DS_IDLE;
            end else if (tick_tx) begin
              if (tcnt == TW'(TIMEOUT_BITS - 1)) begin
                start   <= 1'b1;
                acked   <= 1'b0;
                resends <= resends + 16'd1;
                st      <= DS_SEND;
              end else tcnt <= tcnt + 1'b1;
            end
          end
        endcase
      end
    end
  end

  logic unused;
  assign unused = ^done;
endmodule
