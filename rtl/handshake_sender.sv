// handshake_sender: sender for the TSPIN handshake line.
//
// Sends 20-bit handshake packets: the sync word and the encoded 8-bit
// header {SN, PID}. Two sources of packets:
//   - ack_req pulses from the data receiver ask for one ACK carrying the
//     receiver's SN (the sequence number it expects next);
//   - `mode` asks for a continuous stream: MODE_ACK (game ready, game won)
//     or MODE_GE (game lost).
// FSM (IDLE, SEND, WAIT): IDLE -> SEND when a packet is wanted; SEND ->
// WAIT when the line sender finishes; WAIT keeps the line at 0 for
// GAP_BITS bit times, then goes back to SEND if more packets are wanted
// and to IDLE otherwise. Game end outranks ACK. The gap length is this
// design's choice.
module handshake_sender
  import net_pkg::*;
#(
  parameter int GAP_BITS = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick_tx,
  input  logic [1:0] mode,      // 0 none, 1 continuous ACK, 2 continuous GE
  input  logic       ack_req,
  input  logic [3:0] rx_sn,
  output logic       line,
  output logic [15:0] packets
);
  localparam int ENC = enc_len(HDR_BITS, K_HDR);
  typedef enum logic [1:0] {HS_IDLE, HS_SEND, HS_WAIT} hs_state_t;
  hs_state_t st;
  hdr_t       hdr;
  logic [ENC-1:0] enc;
  logic       pend, start, busy, done;
  logic [3:0] gap;
  logic       want;

  stuff_encode #(.RAW(HDR_BITS), .K(K_HDR)) u_enc (.din(hdr), .dout(enc));
  serial_tx #(.ENC(ENC)) u_tx (.clk, .rst_n, .tick(tick_tx), .start, .payload(enc), .line, .busy, .done);

  assign want = pend || (mode != 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= HS_IDLE; hdr <= '0; pend <= 1'b0; start <= 1'b0; gap <= '0; packets <= '0;
    end else begin
      start <= 1'b0;
      if (ack_req) pend <= 1'b1;
      unique case (st)
        HS_IDLE, HS_WAIT: begin
          if (st == HS_WAIT && tick_tx && gap != 0) gap <= gap - 4'd1;
          if (want && (st == HS_IDLE || gap == 0)) begin
            hdr.sn  <= rx_sn;
            hdr.pid <= (mode == 2'd2) ? PID_GE : PID_ACK;
            if (mode != 2'd2) pend <= ack_req;
            start   <= 1'b1;
            packets <= packets + 16'd1;
            st      <= HS_SEND;
          end else if (st == HS_WAIT && gap == 0) begin
            st <= HS_IDLE;
          end
        end
        default:  // HS_SEND
          if (done) begin
            gap <= 4'(GAP_BITS);
            st  <= HS_WAIT;
          end
      endcase
    end
  end
endmodule
