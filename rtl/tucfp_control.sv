// tucfp_control: the finite state machine of the TCP/UDP checksum page.
//
// It follows the packet word by word (one 32-bit word per clock whenever
// in_valid is high) and drives the calculation unit, the length counter and
// the memory unit.  Its branches:
//   IPv4     V4_W1..V4_W4 read identification/flags/offset, protocol, source
//            and destination; V4_OPT steps over options (IHL > 5).
//   IPv6     V6_W1 reads payload length and next header, V6_ADDR the two
//            addresses; V6_EXT / V6_EXT_REST step over hop-by-hop, routing,
//            destination-options and fragment headers (the latter supplies
//            offset, M flag and identification).
//   payload  PAYLOAD adds the TCP/UDP words; the length counter masks bytes
//            past the IP length (odd length, Ethernet padding).  The first
//            payload word snapshots the pseudo-header sum and, for a
//            fragment, starts the two-cycle memory lookup.
//   SKIP     waits for the end of a packet that is not checked.
//   finish   FIN1 fragment end, FIN2 pseudo header protocol/length or merge
//            with the stored partial sum, FIN3 memory update or release,
//            FIN4 length of a completed fragmented packet and the result.
// The pseudo-header addresses are summed as they pass in the header; the
// protocol and the length are added after the last word, when they are
// known.  For a fragment the protocol goes into the stored sum with the
// first fragment seen and the length with the one that completes the
// packet, so the pseudo header counts once whatever the arrival order.
//
// Timing: the result (res_valid for one clock) appears at the fourth clock
// edge after the edge that accepted the last word (in_eop), and the machine
// is back in IDLE at that edge, so the next packet may start in the fifth
// cycle after the last word: within the five-cycle gap the document gives.
// A new packet (in_sop) must not arrive while busy is high.
// The memory write bundle carries the accumulator and the 16-bit counter
// straight through (partial sum and bytes received); only the strobes, the
// place and the total-length fields are formed here.
// Document: self-contained FSM with IPv4/IPv6 and fragment branches, the
// five-cycle limit, Fig. 3's IPv4 flow.  Its 76-state encoding is not given;
// this smaller state set and the finish sequence are this design's own.
module tucfp_control
  import tucfp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // packet stream
  input  logic               in_valid,
  input  logic               in_sop,
  input  logic               in_eop,
  input  logic [31:0]        in_data,
  output logic               busy,
  // calculation unit
  output logic               calc_clr,
  output calc_op_e           calc_op,
  output logic [3:0]         calc_mask,
  output logic [7:0]         calc_proto,
  output logic [15:0]        calc_len,
  output logic [15:0]        calc_total,
  output logic               ph_capture,
  input  logic [15:0]        acc,
  input  logic [15:0]        acc_next,
  // length counter
  output len_op_e            lc_op,
  output logic               lc_frag_hdr,
  output logic [12:0]        lc_offset,
  output logic [15:0]        lc_acc_len,
  input  logic [15:0]        cnt,
  input  logic [3:0]         hdr,
  input  logic [15:0]        flen,
  input  logic [15:0]        fend,
  input  logic [3:0]         pay_mask,
  input  logic               ext_too_long,
  // memory unit
  output logic               lookup,
  output frag_key_t          key,
  input  logic               hit,
  input  logic [SLOT_W-1:0]  hit_idx,
  input  frag_state_t        rd_state,
  input  logic               free_avail,
  input  logic [SLOT_W-1:0]  free_idx,
  output logic               wr_en,
  output logic               wr_alloc,
  output logic [SLOT_W-1:0]  wr_idx,
  output frag_state_t        wr_state,
  output logic               rel_en,
  output logic [SLOT_W-1:0]  rel_idx,
  // result
  output logic               res_valid,
  output result_t            res
);
  typedef enum logic [3:0] {
    S_IDLE, S_V4_W1, S_V4_W2, S_V4_W3, S_V4_W4, S_V4_OPT,
    S_V6_W1, S_V6_ADDR, S_V6_EXT, S_V6_EXT_REST,
    S_PAYLOAD, S_SKIP, S_FIN1, S_FIN2, S_FIN3, S_FIN4
  } state_e;

  state_e       state, state_n;

  // packet registers
  logic         v6, frag, mf, skip, first, in_frag_hdr;
  logic [12:0]  offset;
  logic [7:0]   proto, nh;
  logic [127:0] src, dst;
  logic [31:0]  ident;
  status_e      skip_status;
  // finish registers
  logic         no_slot, complete;
  logic [15:0]  total_q;
  logic [SLOT_W-1:0] slot;

  // next-header classification
  function automatic logic is_l4(input logic [7:0] p);
    return (p == PROTO_TCP) || (p == PROTO_UDP);
  endfunction
  function automatic logic is_ext(input logic [7:0] p);
    return (p == NH_HOP_BY_HOP) || (p == NH_ROUTING) || (p == NH_DEST_OPTS) || (p == NH_FRAGMENT);
  endfunction

  assign busy = (state != S_IDLE);
  assign key  = '{v6: v6, src: src, dst: dst, id: ident, proto: v6 ? 8'h00 : proto};

  // the place of this packet in memory: the hit, else a new one
  logic [SLOT_W-1:0] slot_c;
  assign slot_c = hit ? hit_idx : free_idx;

  // values of the memory update in FIN3
  logic        known_new, complete_c;
  logic [15:0] total_new;
  assign known_new  = (hit && rd_state.total_known) || !mf;
  assign total_new  = (hit && rd_state.total_known) ? rd_state.total : fend;
  assign complete_c = known_new && (cnt == total_new);

  // header word accepted this cycle
  logic take;
  assign take = in_valid && (state != S_IDLE) && (state < S_FIN1) ;

  // ---------------- combinational control ----------------
  always_comb begin
    state_n     = state;
    calc_clr    = 1'b0;
    calc_op     = OP_NONE;
    calc_mask   = 4'hF;
    calc_proto  = proto;
    calc_len    = frag ? 16'h0000 : flen;
    calc_total  = total_q;
    ph_capture  = 1'b0;
    lc_op       = LC_HOLD;
    lc_frag_hdr = (nh == NH_FRAGMENT);
    lc_offset   = offset;
    lc_acc_len  = hit ? rd_state.acc_len : 16'h0000;
    lookup      = 1'b0;
    wr_en       = 1'b0;
    wr_alloc    = !hit;
    wr_idx      = slot;
    wr_state    = '{partial: acc, acc_len: cnt, total: total_new, total_known: known_new};
    rel_en      = 1'b0;
    rel_idx     = slot;

    unique case (state)
      S_IDLE: if (in_valid && in_sop) begin
        calc_clr = 1'b1;
        if (in_data[31:28] == 4'd4 && in_data[27:24] >= 4'd5) begin
          lc_op   = LC_LOAD_V4;
          state_n = S_V4_W1;
        end else if (in_data[31:28] == 4'd6) begin
          state_n = S_V6_W1;
        end else begin
          state_n = S_SKIP;
        end
        if (in_eop) state_n = S_FIN1;
      end
      S_V4_W1, S_V4_W2, S_V4_OPT: if (in_valid) begin
        lc_op = LC_HDR_DEC;
        if (state == S_V4_W1)      state_n = S_V4_W2;
        else if (state == S_V4_W2) state_n = S_V4_W3;
        else if (hdr == 4'd1)      state_n = skip ? S_SKIP : S_PAYLOAD;
      end
      S_V4_W3, S_V4_W4: if (in_valid) begin
        lc_op   = LC_HDR_DEC;
        calc_op = OP_DATA;
        if (state == S_V4_W3)  state_n = S_V4_W4;
        else if (hdr == 4'd1)  state_n = skip ? S_SKIP : S_PAYLOAD;
        else                   state_n = S_V4_OPT;
      end
      S_V6_W1: if (in_valid) begin
        lc_op   = LC_LOAD_V6;
        state_n = S_V6_ADDR;
      end
      S_V6_ADDR: if (in_valid) begin
        lc_op   = LC_HDR_DEC;
        calc_op = OP_DATA;
        if (hdr == 4'd1) begin
          if (is_ext(nh))     state_n = S_V6_EXT;
          else if (is_l4(nh)) state_n = S_PAYLOAD;
          else                state_n = S_SKIP;
        end
      end
      S_V6_EXT: if (in_valid) begin
        lc_op   = LC_EXT;
        state_n = ext_too_long ? S_SKIP : S_V6_EXT_REST;
      end
      S_V6_EXT_REST: if (in_valid) begin
        lc_op = LC_HDR_DEC;
        if (hdr == 4'd1) begin
          if (skip)           state_n = S_SKIP;
          else if (is_ext(nh)) state_n = S_V6_EXT;
          else if (is_l4(nh)) state_n = S_PAYLOAD;
          else                state_n = S_SKIP;
        end
      end
      S_PAYLOAD: if (in_valid) begin
        calc_op   = OP_DATA;
        calc_mask = pay_mask;
        lc_op     = first ? LC_PAY_FIRST : LC_PAYLOAD;
        ph_capture = first;
        lookup    = first && frag;
      end
      S_SKIP: ;
      S_FIN1: if (!skip) lc_op = LC_FRAG_END;
      S_FIN2: if (!skip) begin
        lc_op = LC_ACC_LEN;
        if (!frag)           calc_op = OP_PROTO_LEN;
        else if (hit)        calc_op = OP_MERGE;
        else if (free_avail) calc_op = OP_PROTO_LEN;
      end
      S_FIN3: if (!skip && frag && !no_slot) begin
        if (complete_c) rel_en = 1'b1;
        else            wr_en  = 1'b1;
      end
      S_FIN4: if (!skip && complete) calc_op = OP_TOTAL;
      default: ;
    endcase

    // end of frame while taking the packet
    if (take && in_eop) state_n = S_FIN1;
    if (state == S_FIN1) state_n = S_FIN2;
    if (state == S_FIN2) state_n = S_FIN3;
    if (state == S_FIN3) state_n = S_FIN4;
    if (state == S_FIN4) state_n = S_IDLE;
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      v6          <= 1'b0;
      frag        <= 1'b0;
      mf          <= 1'b0;
      skip        <= 1'b0;
      first       <= 1'b0;
      in_frag_hdr <= 1'b0;
      offset      <= '0;
      proto       <= '0;
      nh          <= '0;
      src         <= '0;
      dst         <= '0;
      ident       <= '0;
      skip_status <= ST_MALFORMED;
      no_slot     <= 1'b0;
      complete    <= 1'b0;
      total_q     <= '0;
      slot        <= '0;
      res_valid   <= 1'b0;
      res         <= '0;
    end else begin
      state     <= state_n;
      res_valid <= 1'b0;

      unique case (state)
        S_IDLE: if (in_valid && in_sop) begin
          v6          <= (in_data[31:28] == 4'd6);
          frag        <= 1'b0;
          mf          <= 1'b0;
          skip        <= !((in_data[31:28] == 4'd4 && in_data[27:24] >= 4'd5) || in_data[31:28] == 4'd6) || in_eop;
          skip_status <= ST_MALFORMED;
          first       <= 1'b1;
          in_frag_hdr <= 1'b0;
          offset      <= '0;
          proto       <= '0;
          src         <= '0;
          dst         <= '0;
          ident       <= '0;
          no_slot     <= 1'b0;
          complete    <= 1'b0;
        end
        S_V4_W1: if (in_valid) begin
          ident  <= {16'h0000, in_data[31:16]};
          mf     <= in_data[13];
          offset <= in_data[12:0];
          frag   <= in_data[13] || (in_data[12:0] != 13'd0);
        end
        S_V4_W2: if (in_valid) begin
          proto <= in_data[23:16];
          if (!is_l4(in_data[23:16])) begin
            skip        <= 1'b1;
            skip_status <= ST_NOT_L4;
          end
        end
        S_V4_W3: if (in_valid) src <= {96'h0, in_data};
        S_V4_W4: if (in_valid) dst <= {96'h0, in_data};
        S_V6_W1: if (in_valid) nh <= in_data[15:8];
        S_V6_ADDR: if (in_valid) begin
          if (hdr > 4'd4) src <= {src[95:0], in_data};
          else            dst <= {dst[95:0], in_data};
          if (hdr == 4'd1 && !is_ext(nh)) begin
            proto <= nh;
            if (!is_l4(nh)) begin
              skip        <= 1'b1;
              skip_status <= ST_NOT_L4;
            end
          end
        end
        S_V6_EXT: if (in_valid) begin
          nh          <= in_data[31:24];
          in_frag_hdr <= (nh == NH_FRAGMENT);
          if (nh == NH_FRAGMENT) begin
            offset <= in_data[15:3];
            mf     <= in_data[0];
            frag   <= 1'b1;
            // nothing but TCP/UDP may follow the fragment header
            if (!is_l4(in_data[31:24])) begin
              skip        <= 1'b1;
              skip_status <= ST_NOT_L4;
            end
          end
          if (ext_too_long) begin
            skip        <= 1'b1;
            skip_status <= ST_NOT_L4;
          end
        end
        S_V6_EXT_REST: if (in_valid) begin
          if (in_frag_hdr) ident <= in_data;
          if (hdr == 4'd1 && !is_ext(nh)) begin
            proto <= nh;
            if (!is_l4(nh) && !skip) begin
              skip        <= 1'b1;
              skip_status <= ST_NOT_L4;
            end
          end
        end
        S_PAYLOAD: if (in_valid) begin
          first <= 1'b0;
          // frame ends before the IP length says
          if (in_eop && cnt > 16'd4) begin
            skip        <= 1'b1;
            skip_status <= ST_MALFORMED;
          end
        end
        S_FIN2: begin
          slot    <= slot_c;
          no_slot <= frag && !hit && !free_avail;
        end
        S_FIN3: begin
          complete <= frag && !no_slot && complete_c;
          total_q  <= total_new;
        end
        S_FIN4: begin
          res_valid    <= 1'b1;
          res.sum      <= acc_next;
          res.ipv6     <= v6;
          res.fragment <= frag;
          res.proto    <= proto;
          res.slot     <= slot;
          res.l4_len   <= complete ? total_q : flen;
          if (skip)             res.status <= skip_status;
          else if (no_slot)     res.status <= ST_NO_SLOT;
          else if (frag && !complete) res.status <= ST_FRAG_PENDING;
          else                  res.status <= (acc_next == 16'hFFFF) ? ST_OK : ST_BAD;
        end
        default: ;
      endcase

      // end of frame inside a header
      if (take && in_eop && state != S_PAYLOAD && state != S_SKIP) begin
        skip <= 1'b1;
        if (!skip) skip_status <= ST_MALFORMED;
      end
    end
  end

  // a new packet may only start when the machine is idle
  property p_sop_when_idle;
    @(posedge clk) disable iff (!rst_n) (in_valid && in_sop) |-> (state == S_IDLE);
  endproperty
  assert property (p_sop_when_idle) else $error("packet started while the previous one is being finished");
endmodule
