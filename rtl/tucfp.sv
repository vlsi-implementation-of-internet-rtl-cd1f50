// tucfp: TCP/UDP checksum functional page (TUCFP), top level.
//
// Checks the TCP or UDP checksum of IPv4 and IPv6 packets on the fly, at one
// 32-bit word per clock, including the pseudo header and packets that arrive
// as IP fragments in any order and interleaved with fragments of another
// packet.  Four units, as in the document's overview:
//   calc_unit       1's complement accumulation, three 16-bit terms a clock
//   frag_memory     partial results of up to N_ENTRIES fragmented packets
//   length_counter  header, packet and fragment lengths
//   tucfp_control   the FSM that parses the headers and sequences the rest
//
// Stream interface: in_valid qualifies in_data; in_sop marks the first word
// of the IP header (version field in bits 31:28), in_eop the last word of
// the frame.  Bytes past the IP length in the last words (Ethernet padding)
// are ignored.  in_valid may drop inside a packet.  A packet may start in
// the fifth cycle after the previous packet's last word (busy low).
// Result: res_valid for one clock, four edges after the last word, with
// res (tucfp_pkg::result_t): status, final sum, IP version, fragment flag,
// protocol, TCP/UDP length and memory place.
// Reassembly unit side (outside the page): occupied shows the memory places
// in use, ra_drop/ra_drop_slot frees one.
module tucfp
  import tucfp_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sop,
  input  logic                 in_eop,
  input  logic [31:0]          in_data,
  output logic                 busy,
  output logic                 res_valid,
  output result_t              res,
  input  logic                 ra_drop,
  input  logic [SLOT_W-1:0]    ra_drop_slot,
  output logic [N_ENTRIES-1:0] occupied
);
  // calculation unit
  logic        calc_clr, ph_capture;
  calc_op_e    calc_op;
  logic [3:0]  calc_mask;
  logic [7:0]  calc_proto;
  logic [15:0] calc_len, calc_total, acc, acc_next;
  // length counter
  len_op_e     lc_op;
  logic        lc_frag_hdr, ext_too_long;
  logic [12:0] lc_offset;
  logic [15:0] lc_acc_len, cnt, flen, fend;
  logic [3:0]  hdr, pay_mask;
  // memory unit
  logic              lookup, hit, free_avail, wr_en, wr_alloc, rel_en;
  frag_key_t         key;
  logic [SLOT_W-1:0] hit_idx, free_idx, wr_idx, rel_idx;
  frag_state_t       rd_state, wr_state;

  tucfp_control u_control (
    .clk, .rst_n, .in_valid, .in_sop, .in_eop, .in_data, .busy,
    .calc_clr, .calc_op, .calc_mask, .calc_proto, .calc_len, .calc_total, .ph_capture,
    .acc, .acc_next,
    .lc_op, .lc_frag_hdr, .lc_offset, .lc_acc_len, .cnt, .hdr, .flen, .fend, .pay_mask,
    .ext_too_long,
    .lookup, .key, .hit, .hit_idx, .rd_state, .free_avail, .free_idx,
    .wr_en, .wr_alloc, .wr_idx, .wr_state, .rel_en, .rel_idx,
    .res_valid, .res
  );

  calc_unit u_calc (
    .clk, .rst_n, .clr(calc_clr), .op(calc_op), .data(in_data), .byte_mask(calc_mask),
    .proto(calc_proto), .len(calc_len), .partial(rd_state.partial), .total(calc_total),
    .ph_capture, .acc, .acc_next
  );

  length_counter u_len (
    .clk, .rst_n, .op(lc_op), .data(in_data), .frag_hdr(lc_frag_hdr),
    .frag_offset(lc_offset), .acc_len(lc_acc_len), .cnt, .hdr, .flen, .fend,
    .byte_mask(pay_mask), .ext_too_long
  );

  frag_memory #(.N_ENTRIES(N_ENTRIES)) u_mem (
    .clk, .rst_n, .lookup, .key, .hit, .hit_idx, .rd_state, .free_avail, .free_idx,
    .wr_en, .wr_alloc, .wr_idx, .wr_state, .rel_en, .rel_idx,
    .ra_drop, .ra_drop_idx(ra_drop_slot), .occupied
  );
endmodule
