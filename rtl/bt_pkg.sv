// bt_pkg: constants and types shared by the Bluetooth baseband data path.
//
// Packet layout (transmission order): 72-bit access code (4-bit preamble,
// 64-bit sync word, 4-bit trailer), 18-bit header (10 information bits plus an
// 8-bit HEC) sent at FEC rate 1/3 (54 bits), and a 48-bit payload (32-bit
// message plus 16-bit CRC) sent at rate 1/3 (144 bits) or rate 2/3 (75 bits).
// With rate 1/3 on the payload the packet is 72 + 54 + 144 = 270 bits.
// The sizes and both generator polynomials of HEC and CRC follow the document;
// the whitening polynomial, the (15,10) Hamming generator and the packet type
// that selects rate 2/3 are the Bluetooth core specification's values.
package bt_pkg;

  localparam int unsigned AC_BITS       = 72;
  localparam int unsigned SYNC_BITS     = 64;
  localparam int unsigned PRE_BITS      = 4;
  localparam int unsigned TRL_BITS      = 4;
  localparam int unsigned HDR_INFO_BITS = 10;
  localparam int unsigned HEC_BITS      = 8;
  localparam int unsigned HDR_BITS      = HDR_INFO_BITS + HEC_BITS;   // 18
  localparam int unsigned HDR_CODED     = 3 * HDR_BITS;               // 54
  localparam int unsigned MSG_BITS      = 32;
  localparam int unsigned CRC_BITS      = 16;
  localparam int unsigned PAY_BITS      = MSG_BITS + CRC_BITS;        // 48
  localparam int unsigned PAY_CODED13   = 3 * PAY_BITS;               // 144
  localparam int unsigned PAY_BLOCKS23  = (PAY_BITS + 9) / 10;        // 5
  localparam int unsigned PAY_CODED23   = 15 * PAY_BLOCKS23;          // 75
  localparam int unsigned PKT_BITS13    = AC_BITS + HDR_CODED + PAY_CODED13; // 270
  localparam int unsigned PKT_BITS23    = AC_BITS + HDR_CODED + PAY_CODED23; // 201
  localparam int unsigned MSG_BYTES     = MSG_BITS / 8;

  // Generator polynomials, highest power implied, lower terms as a bit mask.
  localparam logic [7:0]  HEC_POLY = 8'hA7;    // D8 + D7 + D5 + D2 + D + 1
  localparam logic [15:0] CRC_POLY = 16'h1021; // D16 + D12 + D5 + 1
  localparam logic [6:0]  WHT_POLY = 7'h11;    // D7 + D4 + 1
  localparam logic [4:0]  H23_POLY = 5'h15;    // D5 + D4 + D2 + 1 = (D+1)(D4+D+1)

  // Packet type whose payload is coded at rate 2/3 (DM1); all others use 1/3.
  localparam logic [3:0] PTYPE_DM1 = 4'h3;

  // The 10 header information bits (Fig 2.4 of the header composition).
  typedef struct packed {
    logic       seqn;     // sequence bit, toggles for each new packet
    logic       arqn;     // 1 = ACK, 0 = NAK
    logic       flow;     // 1 = go, 0 = stop
    logic [3:0] ptype;    // packet type
    logic [2:0] lt_addr;  // active member address
  } bt_hdr_t;
  // Header bits are sent LSB first: lt_addr[0] first, seqn last.

  typedef enum logic [3:0] {
    ST_IDLE,
    ST_TX_LOAD,     // fetch the message, load LFSRs
    ST_TX_AC,       // access code
    ST_TX_HDR,      // header, rate 1/3
    ST_TX_PAY,      // payload, rate 1/3 or 2/3
    ST_TX_DONE,
    ST_RX_SEARCH,   // correlator hunts for the sync word
    ST_RX_TRAILER,  // skip the 4 trailer bits
    ST_RX_HDR,      // decode header
    ST_RX_PAY,      // decode payload
    ST_RX_DONE
  } bt_state_e;

  function automatic logic fec23_for(input logic [3:0] ptype);
    return ptype == PTYPE_DM1;
  endfunction

endpackage
