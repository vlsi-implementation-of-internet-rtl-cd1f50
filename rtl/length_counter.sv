// length_counter: lengths of headers, packets and fragments.
//
// Three pieces of hardware, as the document lists them:
//   * a 4-bit header counter (hdr) holding the number of words of the
//     current header still to come (IPv4 header with options, the IPv6 fixed
//     header, one IPv6 extension header);
//   * one 16-bit counter (cnt) with a single adder whose operands are
//     multiplexed: total length - 4*IHL for IPv4, the remaining TCP/UDP
//     bytes during the payload, 8*fragment offset + fragment length at the
//     end of a fragment (kept in fend), and the bytes of a fragmented packet
//     received so far (stored count + fragment length);
//   * a 13-bit subtractor that removes an IPv6 extension header from the
//     payload length.  Extension headers are multiples of 8 bytes, so the
//     subtraction works on bits 15:3 only, in units of 8 bytes.
// flen keeps the TCP/UDP length of the current packet or fragment, captured
// at its first TCP/UDP word.  byte_mask marks which bytes of the current
// payload word still belong to the TCP/UDP data (Ethernet padding and the
// zero padding of an odd length are masked off).
// Each op takes effect at the clock edge ending the cycle it is given in.
// The split into these three structures follows the document; the op set,
// flen and the use of the subtractor in 8-byte units are this design's.
module length_counter
  import tucfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  len_op_e     op,
  input  logic [31:0] data,         // current packet word
  input  logic        frag_hdr,     // LC_EXT: the header is an IPv6 fragment header
  input  logic [12:0] frag_offset,  // LC_FRAG_END: offset in 8-byte units
  input  logic [15:0] acc_len,      // LC_ACC_LEN: bytes stored for this packet so far
  output logic [15:0] cnt,
  output logic [3:0]  hdr,
  output logic [15:0] flen,
  output logic [15:0] fend,         // end of the last fragment, in bytes
  output logic [3:0]  byte_mask,
  output logic        ext_too_long  // LC_EXT operand: header longer than 15 words
);
  logic [15:0] add_a, add_b, add_y;
  logic [12:0] sub_b, sub_y;
  logic [7:0]  ext_units;   // extension header length in 8-byte units
  logic [15:0] pay_next;

  assign ext_units    = frag_hdr ? 8'd1 : data[23:16] + 8'd1;
  assign ext_too_long = !frag_hdr && (data[23:16] > 8'd7);
  assign sub_b        = {5'b0, ext_units};
  assign sub_y        = cnt[15:3] - sub_b;

  // operand multiplexers of the single 16-bit adder
  always_comb begin
    unique case (op)
      LC_LOAD_V4:  begin add_a = data[15:0]; add_b = ~{10'b0, data[27:24], 2'b00} + 16'd1; end
      LC_FRAG_END: begin add_a = flen;       add_b = {frag_offset, 3'b000};                  end
      LC_ACC_LEN:  begin add_a = flen;       add_b = acc_len;                                 end
      default:     begin add_a = cnt;        add_b = 16'hFFFC;                                end
    endcase
    add_y = add_a + add_b;
  end

  assign pay_next = (cnt > 16'd4) ? add_y : 16'h0000;

  always_comb begin
    for (int i = 0; i < 4; i++) byte_mask[3-i] = (cnt > 16'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= 16'h0000;
      hdr  <= 4'h0;
      flen <= 16'h0000;
      fend <= 16'h0000;
    end else begin
      unique case (op)
        LC_LOAD_V4: begin
          cnt <= add_y;
          hdr <= data[27:24] - 4'd1;
        end
        LC_LOAD_V6: begin
          cnt <= data[31:16];
          hdr <= 4'd8;
        end
        LC_EXT: begin
          cnt <= {sub_y, cnt[2:0]};
          hdr <= 4'({ext_units[6:0], 1'b0} - 8'd1);
        end
        LC_HDR_DEC: hdr <= hdr - 4'd1;
        LC_PAY_FIRST: begin
          flen <= cnt;
          cnt  <= pay_next;
        end
        LC_PAYLOAD:  cnt <= pay_next;
        LC_FRAG_END: cnt <= add_y;
        LC_ACC_LEN: begin
          cnt  <= add_y;
          fend <= cnt;
        end
        default: ;
      endcase
    end
  end
endmodule
