// Shared constants and types of the Axon host-network interface.
//
// The CMP moves 53-byte cells (an ATM-sized packet: 5-byte network header
// plus 48 bytes, of which 32 are application data and 16 are ALTP/MCHIP
// header and trailer). The field list follows the data packet format of the
// ALTP-OT protocol; the byte positions and field widths below are this
// design's own choice:
//
//   0..4   network header template (from the congram state registers)
//   5      MCHIP type            6      ALTP type (data or control)
//   7..8   connection id c       9..10  request id q
//   11     segment group size |g|  12   segment index k
//   13..14 segment length |s_k| (pages)  15..16 page index j
//   17..18 packet index i        19..50 32 data bytes
//   51..52 checksum (16-bit sum over the data bytes, big-endian pairs)
//
// A page is 1 KB, i.e. 32 packets. Multi-byte fields are big-endian.
// The datapath is one octet wide (omega = 8); the major cycle is one byte
// time on the serial link.
package axon_pkg;

  localparam int unsigned W          = 8;    // datapath width omega
  localparam int unsigned CELL_BYTES = 53;
  localparam int unsigned NET_HDR    = 5;
  localparam int unsigned OFF_MTYPE  = 5;
  localparam int unsigned OFF_ATYPE  = 6;
  localparam int unsigned OFF_C      = 7;
  localparam int unsigned OFF_Q      = 9;
  localparam int unsigned OFF_G      = 11;
  localparam int unsigned OFF_K      = 12;
  localparam int unsigned OFF_SK     = 13;
  localparam int unsigned OFF_J      = 15;
  localparam int unsigned OFF_I      = 17;
  localparam int unsigned OFF_DATA   = 19;
  localparam int unsigned DATA_BYTES = 32;
  localparam int unsigned OFF_CK     = 51;
  localparam int unsigned PAGE_BYTES = 1024;
  localparam int unsigned PKTS_PER_PAGE = PAGE_BYTES / DATA_BYTES;  // 32
  // One cell occupies 54 byte times on the link: a framing byte plus the cell.
  localparam int unsigned CELL_SLOT  = CELL_BYTES + 1;

  localparam logic [7:0] MTYPE_DATA  = 8'h01;
  localparam logic [7:0] ATYPE_DATA  = 8'h01;
  localparam logic [7:0] ATYPE_CTRL  = 8'h02;

  // One byte of a cell stream, one per major cycle.
  typedef struct packed {
    logic       v;    // byte present
    logic       sop;  // first byte of a cell
    logic [7:0] d;
  } cbyte_t;

  // Per-congram transmit state, written by the CAP.
  typedef struct packed {
    logic        en;
    logic [15:0] c;       // connection (congram) id
    logic [15:0] q;       // request id
    logic [39:0] nethdr;  // network header template
    logic [7:0]  g;       // segment group size |g|
    logic [7:0]  k;       // segment index
    logic [15:0] sk;      // segment length |s_k| in pages
    logic [15:0] ipg;     // inter-page gap in major cycles (rate spec)
    logic        swap;    // byte-order conversion on
    logic        crypt;   // encryption on
    logic [15:0] key;     // cipher key
  } tx_cfg_t;

  // Per-congram receive state, written by the CAP.
  typedef struct packed {
    logic        en;
    logic [15:0] c;
    logic [15:0] q;
    logic [31:0] base;    // CMM byte address of page 0 of the segment
    logic [7:0]  g;       // segment group size (bounds check on k)
    logic [15:0] sk;      // allocated pages (bounds check on j)
    logic        swap;
    logic        crypt;
    logic [15:0] key;
  } rx_cfg_t;

  // A page (re)transmission request from the CAP: the packets of page j
  // whose bits are set in `bits` are sent from CMM address `base`.
  typedef struct packed {
    logic        rexmit;  // retransmission: served before primary pages
    logic [15:0] j;
    logic [31:0] base;
    logic [31:0] bits;
  } tx_req_t;

  // Decoded header of a received cell.
  typedef struct packed {
    logic        ctrl;    // control cell (to the CAP)
    logic        hit;     // congram found in the receive CSRs
    logic [7:0]  idx;     // CSR index of the congram
    logic        inb;     // k and j within the CSR bounds
    logic [15:0] q;
    logic [7:0]  k;
    logic [15:0] j;
    logic [15:0] i;
  } hdr_t;

  // 16-bit keystream step (Galois LFSR, x^16+x^14+x^13+x^11+1).
  function automatic logic [15:0] lfsr_next(logic [15:0] s);
    return {1'b0, s[15:1]} ^ (s[0] ? 16'hB400 : 16'h0000);
  endfunction

  // Checksum: add a data byte (offset `off` in the cell) into the running
  // 16-bit sum; even data bytes are the high halves of big-endian words.
  function automatic logic [15:0] ck_add(logic [15:0] sum, logic off0, logic [7:0] d);
    logic odd;
    odd = off0 ^ 1'(OFF_DATA % 2);
    return sum + (odd ? {8'h00, d} : {d, 8'h00});
  endfunction

endpackage
