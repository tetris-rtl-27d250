// net_pkg: constants of the TSPIN link (Tetris Synchronous Parallel
// INterface) between two boards.
//
// Each direction has a handshake line and four data lines, plus a clock
// line driven by the master. Every packet is the sync word (eight 1s)
// followed by an encoded payload. The encoding inserts a 0 after every K
// payload bits, so a run of eight 1s never occurs outside the sync word.
//
// Data payload, 836 bits before division (DATA):
//   835-832 SN   sequence number
//   831-828 GBG  garbage lines sent
//   827-824 HLD  hold piece
//   823-800 PQ   piece queue, 6 x 4 bits (entry 0 in 803-800)
//   799-0   PFD  playfield, 20 rows x 10 tiles x 4 bits (row y, column x at
//                bit 40*y + 4*x)
// Line d carries DATA[835-628], [627-420], [419-212], [211-0] for d = 0..3.
// Handshake header, 8 bits: SN in 7-4, PID in 3-0 (ACK = 1, GE = 0).
// Field layout, line split and PIDs follow the protocol definition; the
// zero-insertion code and its K values are this design's.
package net_pkg;
  localparam int SYNC_LEN  = 8;
  localparam int DATA_BITS = 836;
  localparam int HDR_BITS  = 8;
  localparam int K_DATA    = 7;   // a 0 after every 7 data bits
  localparam int K_HDR     = 2;   // a 0 after every 2 header bits

  localparam int CHUNK_HI [4] = '{835, 627, 419, 211};
  localparam int CHUNK_LO [4] = '{628, 420, 212, 0};

  function automatic int enc_len(int raw, int k);
    return raw + raw / k;
  endfunction

  localparam logic [3:0] PID_ACK = 4'd1;
  localparam logic [3:0] PID_GE  = 4'd0;

  typedef struct packed {
    logic [3:0]       sn;
    logic [3:0]       gbg;
    logic [3:0]       hld;
    logic [5:0][3:0]  pq;
    logic [799:0]     pfd;
  } data_pkt_t;

  typedef struct packed {
    logic [3:0] sn;
    logic [3:0] pid;
  } hdr_t;
endpackage
