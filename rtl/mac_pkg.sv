// mac_pkg: shared types and constants of the polling MAC.
//
// Every frame on the network is 64 bytes. Its first 48 bits are the header:
// a 12-bit source address, a 12-bit destination address, a 4-bit frame type,
// a 2-bit connection mode, a 4-bit sequence id and a 14-bit header CRC.
// Bytes 6 and 7 hold the 16-bit payload CRC and bytes 8..63 the payload data.
// Frame bit 0 is the MSB of byte 0, so the packed header struct below, read
// MSB first, is the exact bit order on the wire.
//
// Field widths, frame type codes, mode codes and the two CRC generator
// polynomials follow the protocol definition. The generator constants
// 0x372B and 0xBAAD are given in the implicit-+1 notation; the full
// polynomials are (0x372B << 1) | 1 (degree 14) and (0xBAAD << 1) | 1
// (degree 16). The address plan (master 0x000, slave i at 0x001 + i) and
// the timer lengths are this design's own choices.
package mac_pkg;

  localparam int unsigned ADDR_W        = 12;
  localparam int unsigned FRAME_BYTES   = 64;
  localparam int unsigned HDR_BITS      = 34;   // src + dst + type + mode + seq
  localparam int unsigned HCRC_W        = 14;
  localparam int unsigned PCRC_W        = 16;
  localparam int unsigned PCRC_OFF      = 6;    // byte offset of the payload CRC
  localparam int unsigned PAYLOAD_OFF   = 8;    // byte offset of the payload data
  localparam int unsigned PAYLOAD_BYTES = FRAME_BYTES - PAYLOAD_OFF;  // 56

  // Full generator polynomials including the x^W term.
  localparam logic [HCRC_W:0] HCRC_POLY = 15'h6E57;   // 0x372B, Koopman notation
  localparam logic [PCRC_W:0] PCRC_POLY = 17'h1755B;  // 0xBAAD, Koopman notation

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [3:0]        seq_t;

  typedef enum logic [3:0] {
    FT_POLL    = 4'b0000,
    FT_ACK     = 4'b0001,
    FT_NAK     = 4'b0010,
    FT_RTS     = 4'b0011,
    FT_CTS     = 4'b0100,
    FT_CNE_NAK = 4'b0101,
    FT_CNE_ACK = 4'b0110,
    FT_DATA    = 4'b0111,
    FT_TNE     = 4'b1110
  } ftype_e;

  typedef enum logic [1:0] {
    MODE_UP   = 2'b00,
    MODE_DOWN = 2'b01
  } mode_e;

  typedef struct packed {
    addr_t  src;
    addr_t  dst;
    ftype_e ftype;
    mode_e  mode;
    seq_t   seq;
  } mac_hdr_t;

  // One-cycle event pulses of the master control block, for monitoring.
  typedef struct packed {
    logic poll;          // a POLL frame was built (new connection)
    logic skip;          // downlink slot skipped: nothing stored for that slave
    logic resend;        // the frame in the output memory was sent again
    logic timeout;       // a wait timer expired
    logic bad_frame;     // a wrong frame was received
    logic err_close;     // second consecutive error: connection closed
    logic conn_expired;  // the time per connection ran out
    logic data_stored;   // an uplink data frame was stored in a slave ring
    logic duplicate;     // an already stored data frame came again
    logic overflow;      // a data frame was refused: destination ring full
    logic data_acked;    // a downlink data frame was acknowledged
    logic nak_sent;      // a NAK frame was built
    logic tne_rx;        // a TNE frame from the polled slave was accepted
    logic long_wait;     // the closing wait was entered
  } master_ev_t;

  // One-cycle event pulses of the slave control block.
  typedef struct packed {
    logic polled;        // a POLL for this slave was accepted
    logic resend;        // the frame in the output memory was sent again
    logic timeout;       // a wait timer expired
    logic bad_frame;     // a wrong frame was received
    logic err_close;     // second consecutive error: TNE sent
    logic data_stored;   // a downlink data frame was stored
    logic duplicate;     // an already stored data frame came again
    logic overflow;      // a data frame was refused: receive ring full
    logic data_acked;    // an uplink data frame was acknowledged
    logic cne_rx;        // a CNE frame ended the connection
    logic no_data;       // polled uplink with nothing to send: TNE
    logic close_wait;    // the closing wait was entered
  } slave_ev_t;

  localparam addr_t MASTER_ADDR     = 12'h000;
  localparam addr_t SLAVE_BASE_ADDR = 12'h001;

endpackage
