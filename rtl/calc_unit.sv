// calc_unit: the calculation unit of the TCP/UDP checksum page.
//
// Every enabled cycle it adds three 16-bit terms in 1's complement: the two
// halves of a 32-bit operand and the accumulated value.  A multiplexer picks
// the operand (the incoming packet word with its invalid bytes forced to
// zero, the pseudo header protocol and length, a stored partial sum, or the
// length of a reassembled packet) and two direct 1's complement adders in
// series form  acc + (hi + lo).  This adder chain is the path the document
// identifies as the critical one.
//
// ph_capture stores the accumulator in the pseudo-header register: it is
// issued before the first TCP/UDP word, when the accumulator holds exactly
// the pseudo header addresses of this packet.  OP_MERGE adds the complement
// of that register, which removes them again, so that a fragment merged into
// an earlier partial sum contributes its pseudo header only once.
//
// Timing: operand in cycle n, result in acc after the clock edge ending n.
// clr has priority and empties the accumulator (0x0000).
// Following the document: 32-bit word, three terms per cycle, two DIR adders
// in series with a multiplexer.  The accumulator register sits here rather
// than in the memory unit, and the pseudo-header register is this design's
// own way of including the pseudo header once.
module calc_unit
  import tucfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,         // start of a new packet
  input  calc_op_e    op,
  input  logic [31:0] data,        // packet word, byte 0 in [31:24]
  input  logic [3:0]  byte_mask,   // bit 3 = byte 0 valid ... bit 0 = byte 3 valid
  input  logic [7:0]  proto,       // pseudo header protocol / next header
  input  logic [15:0] len,         // pseudo header length term for OP_PROTO_LEN
  input  logic [15:0] partial,     // stored partial sum for OP_MERGE
  input  logic [15:0] total,       // reassembled length for OP_TOTAL
  input  logic        ph_capture,
  output logic [15:0] acc,
  output logic [15:0] acc_next
);
  logic [15:0] op_hi, op_lo, s1, s2, ph;
  logic [31:0] masked;

  always_comb begin
    masked = data & {{8{byte_mask[3]}}, {8{byte_mask[2]}}, {8{byte_mask[1]}}, {8{byte_mask[0]}}};
    unique case (op)
      OP_DATA:      begin op_hi = masked[31:16];    op_lo = masked[15:0]; end
      OP_PROTO_LEN: begin op_hi = {8'h00, proto};   op_lo = len;          end
      OP_MERGE:     begin op_hi = ~ph;              op_lo = partial;      end
      OP_TOTAL:     begin op_hi = total;            op_lo = 16'h0000;     end
      default:      begin op_hi = 16'h0000;         op_lo = 16'h0000;     end
    endcase
  end

  oc_add16 u_add_terms (.a(op_hi), .b(op_lo), .sum(s1));
  oc_add16 u_add_acc   (.a(s1),    .b(acc),   .sum(s2));

  always_comb begin
    if (clr)              acc_next = 16'h0000;
    else if (op != OP_NONE) acc_next = s2;
    else                  acc_next = acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= 16'h0000;
      ph  <= 16'h0000;
    end else begin
      acc <= acc_next;
      if (ph_capture) ph <= acc;
    end
  end
endmodule
