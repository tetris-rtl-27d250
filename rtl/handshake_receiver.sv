// handshake_receiver: receiver for the TSPIN handshake line.
//
// FSM (IDLE, RECEIVE, WAIT): the line receiver hunts the sync word (IDLE),
// shifts in the 12 encoded header bits (RECEIVE) and the header is decoded
// (WAIT, one clock), which reports either ack_valid with the ACK's
// sequence number or ge_valid for a game-end packet. Headers with another
// PID or a broken line code are counted in `bad` and ignored.
module handshake_receiver
  import net_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick_rx,
  input  logic       line_in,
  output logic       ack_valid,
  output logic [3:0] ack_sn,
  output logic       ge_valid,
  output logic [15:0] bad
);
  localparam int ENC = enc_len(HDR_BITS, K_HDR);
  typedef enum logic [1:0] {HR_IDLE, HR_RECEIVE, HR_WAIT} hr_state_t;
  hr_state_t st;
  logic           sync, valid, receiving, err;
  logic [ENC-1:0] data;
  hdr_t           hdr;

  serial_rx #(.ENC(ENC)) u_rx (.clk, .rst_n, .tick(tick_rx), .line_in, .drop(1'b0),
                               .sync, .valid, .data, .receiving);
  stuff_decode #(.RAW(HDR_BITS), .K(K_HDR)) u_dec (.din(data), .dout(hdr), .error(err));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= HR_IDLE; ack_valid <= 1'b0; ack_sn <= '0; ge_valid <= 1'b0; bad <= '0;
    end else begin
      ack_valid <= 1'b0;
      ge_valid  <= 1'b0;
      unique case (st)
        HR_IDLE:    if (sync) st <= HR_RECEIVE;
        HR_RECEIVE: if (valid) st <= HR_WAIT;
        default: begin
          st <= HR_IDLE;
          if (!err && hdr.pid == PID_ACK) begin
            ack_valid <= 1'b1;
            ack_sn    <= hdr.sn;
          end else if (!err && hdr.pid == PID_GE) begin
            ge_valid <= 1'b1;
          end else begin
            bad <= bad + 16'd1;
          end
        end
      endcase
    end
  end

  logic unused;
  assign unused = receiving;
endmodule
