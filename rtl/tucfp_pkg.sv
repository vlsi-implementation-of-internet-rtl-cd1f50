// tucfp_pkg: types and constants shared by the TCP/UDP checksum functional
// page (TUCFP).  The page receives an IP packet as a stream of 32-bit words
// (first byte of the packet in bits 31:24), computes the TCP/UDP Internet
// checksum including the IPv4 or IPv6 pseudo header, and keeps partial sums
// of fragmented packets in a small register memory.
package tucfp_pkg;

  // Width of the data path: one 32-bit word per clock.
  localparam int unsigned WORD_W = 32;
  // Width of the slot index carried in results (up to 16 memory places).
  localparam int unsigned SLOT_W = 4;

  // IP protocol / next-header numbers the page understands.
  localparam logic [7:0] PROTO_TCP      = 8'd6;
  localparam logic [7:0] PROTO_UDP      = 8'd17;
  localparam logic [7:0] NH_HOP_BY_HOP  = 8'd0;
  localparam logic [7:0] NH_ROUTING     = 8'd43;
  localparam logic [7:0] NH_FRAGMENT    = 8'd44;
  localparam logic [7:0] NH_DEST_OPTS   = 8'd60;

  // Identification of a fragmented packet ("connection state variables").
  // IPv4: source, destination, protocol and 16-bit identification.
  // IPv6: source, destination and 32-bit identification (protocol 0).
  // IPv4 addresses sit in the low 32 bits of the address fields.
  typedef struct packed {
    logic         v6;
    logic [127:0] src;
    logic [127:0] dst;
    logic [31:0]  id;
    logic [7:0]   proto;
  } frag_key_t;

  // What is kept per fragmented packet between its fragments.
  typedef struct packed {
    logic [15:0] partial;      // 1's complement sum so far (incl. pseudo header addresses and protocol)
    logic [15:0] acc_len;      // TCP/UDP bytes received so far
    logic [15:0] total;        // TCP/UDP length of the whole packet, once known
    logic        total_known;  // the last fragment has arrived
  } frag_state_t;

  // Operand selection of the calculation unit.
  typedef enum logic [2:0] {
    OP_NONE,       // hold the accumulator
    OP_DATA,       // both halves of the incoming word, byte-masked
    OP_PROTO_LEN,  // pseudo header protocol and TCP/UDP length
    OP_MERGE,      // remove this fragment's pseudo header, add the stored partial sum
    OP_TOTAL       // pseudo header length of a reassembled packet
  } calc_op_e;

  // Operations of the length counter.
  typedef enum logic [3:0] {
    LC_HOLD,       // keep everything
    LC_LOAD_V4,    // IPv4 word 0: length = total length - 4*IHL, header count = IHL-1
    LC_LOAD_V6,    // IPv6 word 1: length = payload length, header count = 8
    LC_EXT,        // first word of an IPv6 extension header: subtract its length
    LC_HDR_DEC,    // one more header word consumed
    LC_PAY_FIRST,  // first TCP/UDP word: remember the fragment length, count 4 bytes
    LC_PAYLOAD,    // further TCP/UDP word: count 4 bytes
    LC_FRAG_END,   // end of this fragment = 8*offset + fragment length
    LC_ACC_LEN     // bytes received = stored count + fragment length; keep the fragment end
  } len_op_e;

  // Outcome reported for each packet.
  typedef enum logic [2:0] {
    ST_OK,            // checksum correct (complete packet or last missing fragment)
    ST_BAD,           // checksum wrong
    ST_FRAG_PENDING,  // fragment stored, packet not complete yet
    ST_NOT_L4,        // neither TCP nor UDP, or unsupported extension header
    ST_NO_SLOT,       // fragment of a new packet but all memory places are taken
    ST_MALFORMED      // bad version/IHL or frame shorter than the IP lengths
  } status_e;

  typedef struct packed {
    status_e           status;
    logic [15:0]       sum;       // final 1's complement sum (16'hFFFF when correct)
    logic              ipv6;
    logic              fragment;
    logic [7:0]        proto;
    logic [15:0]       l4_len;    // TCP/UDP length of this packet or fragment
    logic [SLOT_W-1:0] slot;      // memory place of a fragment
  } result_t;

endpackage
