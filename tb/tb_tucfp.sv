// tb_tucfp: end-to-end test of the TCP/UDP checksum page at its default size.
//
// A packet generator builds TCP and UDP segments with a correct checksum
// (some deliberately corrupted), wraps them in IPv4 headers (with and without
// options) or IPv6 headers (with and without hop-by-hop / destination-option
// headers), fragments some of them on 8-byte boundaries, shuffles and
// interleaves the fragments of two packets, pads short frames to the
// Ethernet minimum and fills the unused bytes of the last word with junk.
// Frames are sent back to back with the minimum gap (the next packet starts
// in the fifth cycle after the last word) and random in_valid stalls.
// A reference model, written independently of the RTL, sums the pseudo
// header and the whole segment with a 32-bit accumulator and folds it, and
// tracks which fragmented packets occupy the memory places.  Every result is
// compared field by field, and its latency must be four clocks.  Each
// mechanism of the design is counted; one that never happens is a failure.
module tb_tucfp;
  import tucfp_pkg::*;

  localparam int NSLOT = 2;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              in_valid = 1'b0, in_sop = 1'b0, in_eop = 1'b0;
  logic [31:0]       in_data = '0;
  logic              busy, res_valid;
  result_t           res;
  logic              ra_drop = 1'b0;
  logic [SLOT_W-1:0] ra_drop_slot = '0;
  logic [NSLOT-1:0]  occupied;

  int checks = 0, failures = 0;

  tucfp dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // mechanism counters
  typedef enum int {
    M_V4, M_V6, M_V4_OPTIONS, M_V6_EXT, M_FRAG_V4_DONE, M_FRAG_V6_DONE,
    M_OUT_OF_ORDER, M_INTERLEAVED, M_NO_SLOT, M_BAD_DETECTED, M_ETH_PAD,
    M_ODD_LEN, M_STALL, M_NOT_L4, M_MALFORMED, M_RA_DROP, M_TCP, M_UDP, M_SHORT_FRAG, M_ROUTING, M_ATOMIC, M_GOLDEN, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"ipv4", "ipv6", "ipv4 options", "ipv6 extension headers",
    "ipv4 reassembled", "ipv6 reassembled", "fragments out of order", "interleaved fragmented packets",
    "memory full", "bad checksum detected", "ethernet padding", "odd length", "input stall",
    "not tcp/udp", "truncated frame", "reassembly drop", "tcp", "udp", "one-word fragment", "ipv6 routing header",
    "ipv6 atomic fragment", "fixed reference packet"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------------
  // reference checksum: 32-bit accumulation of 16-bit words, folded
  typedef byte unsigned bytes_t[$];

  function automatic bit [31:0] sum_bytes(input bytes_t b, input bit [31:0] acc);
    for (int i = 0; i < b.size(); i += 2) begin
      bit [15:0] w;
      w = {b[i], (i + 1 < b.size()) ? b[i+1] : 8'h00};
      acc += 32'(w);
    end
    return acc;
  endfunction

  function automatic bit [15:0] fold(input bit [31:0] acc);
    while (acc[31:16] != 0) acc = 32'(acc[15:0]) + 32'(acc[31:16]);
    return acc[15:0];
  endfunction

  class Pkt;
    bit          v6;
    bit [127:0]  src, dst;
    bit [31:0]   id;
    bit [7:0]    proto;
    bytes_t      l4;
    bit          bad;
    int          n_frags_left;
    bit          seen_order_break;

    function bit [31:0] pseudo_sum();
      bit [31:0] a = 0;
      int n = v6 ? 8 : 2;
      for (int i = 0; i < n; i++) a += 32'(src[16*i +: 16]) + 32'(dst[16*i +: 16]);
      a += 32'(proto) + 32'(l4.size() & 16'hFFFF);
      return a;
    endfunction

    function bit [15:0] ref_sum();
      return fold(sum_bytes(l4, pseudo_sum()));
    endfunction
  endclass

  class Frame;
    bytes_t b;
    Pkt     p;
    bit     frag, last, not_l4, truncated;
    int     offset, flen;
    bit     stall;
  endclass

  // ------------------------------------------------------------------
  // packet construction
  function automatic Pkt new_pkt(input bit v6, input bit [7:0] proto, input int len, input bit bad);
    Pkt p = new;
    bit [15:0] ck;
    int ckpos;
    p.v6 = v6;
    p.proto = proto;
    p.src = v6 ? {$urandom, $urandom, $urandom, $urandom} : {96'h0, 32'($urandom)};
    p.dst = v6 ? {$urandom, $urandom, $urandom, $urandom} : {96'h0, 32'($urandom)};
    p.id  = v6 ? 32'($urandom) : {16'h0, 16'($urandom)};
    p.bad = bad;
    for (int i = 0; i < len; i++) p.l4.push_back(8'($urandom));
    ckpos = (proto == PROTO_TCP) ? 16 : 6;
    if (proto == PROTO_UDP) begin
      p.l4[4] = 8'(len >> 8);
      p.l4[5] = 8'(len);
    end
    if (proto == PROTO_TCP || proto == PROTO_UDP) begin
      p.l4[ckpos] = 0;
      p.l4[ckpos+1] = 0;
      ck = ~p.ref_sum();
      p.l4[ckpos] = ck[15:8];
      p.l4[ckpos+1] = ck[7:0];
      if (bad) p.l4[len-1] = p.l4[len-1] ^ 8'h01;
    end
    return p;
  endfunction

  function automatic void put16(ref bytes_t b, input bit [15:0] v);
    b.push_back(v[15:8]); b.push_back(v[7:0]);
  endfunction
  function automatic void put32(ref bytes_t b, input bit [31:0] v);
    put16(b, v[31:16]); put16(b, v[15:0]);
  endfunction

  // IPv4 header + piece of the segment
  function automatic Frame v4_frame(input Pkt p, input int ihl, input int off, input int plen, input bit mf);
    Frame f = new;
    f.p = p; f.offset = off; f.flen = plen;
    f.frag = mf || off != 0; f.last = !mf;
    f.b.push_back(8'h40 | 8'(ihl));
    f.b.push_back(8'h00);
    put16(f.b, 16'(ihl * 4 + plen));
    put16(f.b, p.id[15:0]);
    put16(f.b, {2'b00, mf, 13'(off / 8)});
    f.b.push_back(8'd64);
    f.b.push_back(p.proto);
    put16(f.b, 16'h0000);
    put32(f.b, p.src[31:0]);
    put32(f.b, p.dst[31:0]);
    for (int i = 5; i < ihl; i++) put32(f.b, 32'h01010101);
    for (int i = 0; i < plen; i++) f.b.push_back(p.l4[off + i]);
    return f;
  endfunction

  function automatic void ext_hdr(ref bytes_t e, input bit [7:0] nh, input int hel);
    e.push_back(nh);
    e.push_back(8'(hel));
    for (int i = 0; i < (hel + 1) * 8 - 2; i++) e.push_back(8'($urandom));
  endfunction

  // IPv6 header; n_ext option headers before the (optional) fragment header
  function automatic Frame v6_frame(input Pkt p, input int n_ext, input bit fh,
                                    input int off, input int plen, input bit mf);
    Frame f = new;
    bytes_t e;
    bit [7:0] types[2];
    bit [7:0] first_nh;
    types[0] = NH_HOP_BY_HOP;
    types[1] = ($urandom_range(0, 1) == 1) ? NH_ROUTING : NH_DEST_OPTS;
    if (n_ext > 1 && types[1] == NH_ROUTING) mech[M_ROUTING]++;
    f.p = p; f.offset = off; f.flen = plen;
    f.frag = fh; f.last = !mf;
    for (int i = 0; i < n_ext; i++) begin
      bit [7:0] nxt = (i + 1 < n_ext) ? types[i+1] : (fh ? NH_FRAGMENT : p.proto);
      ext_hdr(e, nxt, $urandom_range(0, 2));
    end
    if (fh) begin
      e.push_back(p.proto);
      e.push_back(8'h00);
      put16(e, {13'(off / 8), 2'b00, mf});
      put32(e, p.id);
    end
    first_nh = (n_ext > 0) ? types[0] : (fh ? NH_FRAGMENT : p.proto);
    put32(f.b, 32'h60000000 | 32'($urandom_range(0, 'hFFFFF)));
    put16(f.b, 16'(e.size() + plen));
    f.b.push_back(first_nh);
    f.b.push_back(8'd64);
    for (int i = 0; i < 4; i++) put32(f.b, p.src[32*(3-i) +: 32]);
    for (int i = 0; i < 4; i++) put32(f.b, p.dst[32*(3-i) +: 32]);
    foreach (e[i]) f.b.push_back(e[i]);
    for (int i = 0; i < plen; i++) f.b.push_back(p.l4[off + i]);
    return f;
  endfunction

  function automatic Frame whole(input Pkt p, input int opt);
    if (p.v6) return v6_frame(p, opt, 1'b0, 0, p.l4.size(), 1'b0);
    return v4_frame(p, 5 + opt, 0, p.l4.size(), 1'b0);
  endfunction

  // split into fragments on 8-byte boundaries, in order
  function automatic void fragment(input Pkt p, input int nfr, ref Frame q[$]);
    int len = p.l4.size();
    int pos = 0;
    for (int k = 0; k < nfr; k++) begin
      int plen;
      bit mf = (k + 1 < nfr);
      if (mf) plen = 8 * $urandom_range(1, ((len - pos) / 8) / (nfr - k));
      else    plen = len - pos;
      if (p.v6) q.push_back(v6_frame(p, $urandom_range(0, 1), 1'b1, pos, plen, mf));
      else      q.push_back(v4_frame(p, 5 + $urandom_range(0, 2), pos, plen, mf));
      pos += plen;
    end
    p.n_frags_left = nfr;
  endfunction

  // ------------------------------------------------------------------
  // reference model of the memory places
  Pkt slots [NSLOT];
  int slot_rcv [NSLOT];

  function automatic int find_slot(input Pkt p);
    for (int i = 0; i < NSLOT; i++)
      if (slots[i] != null && slots[i].v6 == p.v6 && slots[i].src == p.src && slots[i].dst == p.dst
          && slots[i].id == p.id && (p.v6 || slots[i].proto == p.proto)) return i;
    return -1;
  endfunction

  function automatic int n_busy();
    int n = 0;
    for (int i = 0; i < NSLOT; i++) if (slots[i] != null) n++;
    return n;
  endfunction

  // ------------------------------------------------------------------
  // driver and checker
  int last_off [Pkt];

  task automatic send(input Frame f);
    bytes_t b = f.b;
    int nw;
    status_e  exp_st;
    bit       exp_sum_chk = 0;
    bit [15:0] exp_sum = 0;
    int       exp_len;
    int       exp_slot = -1;
    int       lat;
    bit       stalled = 0;

    if (b.size() < 46) begin
      mech[M_ETH_PAD]++;
      while (b.size() < 46) b.push_back(8'($urandom));
    end
    if (f.truncated) begin
      repeat (12) void'(b.pop_back());
    end
    if (f.p.l4.size() % 2 == 1 && !f.frag) mech[M_ODD_LEN]++;
    if (f.frag && f.flen <= 4) mech[M_SHORT_FRAG]++;
    nw = (b.size() + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      bit [31:0] d;
      for (int k = 0; k < 4; k++) d[31-8*k -: 8] = (4*w + k < b.size()) ? b[4*w+k] : 8'($urandom);
      if (w > 0 && $urandom_range(0, 9) == 0) begin
        in_valid = 1'b0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
        stalled = 1;
      end
      in_valid = 1'b1;
      in_sop = (w == 0);
      in_eop = (w == nw - 1);
      in_data = d;
      @(negedge clk);
    end
    in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0;
    if (stalled) mech[M_STALL]++;

    // expected outcome
    exp_len = f.frag ? f.flen : f.p.l4.size();
    if (f.not_l4) begin
      exp_st = ST_NOT_L4;
    end else if (f.truncated) begin
      exp_st = ST_MALFORMED;
    end else if (!f.frag) begin
      exp_sum = f.p.ref_sum(); exp_sum_chk = 1;
      exp_st = f.p.bad ? ST_BAD : ST_OK;
    end else begin
      int s = find_slot(f.p);
      if (s < 0) begin
        for (int i = NSLOT - 1; i >= 0; i--) if (slots[i] == null) s = i;
        if (s >= 0) begin slots[s] = f.p; slot_rcv[s] = 0; end
      end
      if (s < 0) begin
        exp_st = ST_NO_SLOT;
        mech[M_NO_SLOT]++;
      end else begin
        exp_slot = s;
        if (last_off.exists(f.p) && f.offset < last_off[f.p]) f.p.seen_order_break = 1;
        last_off[f.p] = f.offset;
        if (n_busy() > 1) mech[M_INTERLEAVED]++;
        slot_rcv[s] += f.flen;
        if (slot_rcv[s] == f.p.l4.size()) begin
          slots[s] = null;
          exp_sum = f.p.ref_sum(); exp_sum_chk = 1;
          exp_st = f.p.bad ? ST_BAD : ST_OK;
          exp_len = f.p.l4.size();
          if (f.p.v6) mech[M_FRAG_V6_DONE]++; else mech[M_FRAG_V4_DONE]++;
          if (f.p.seen_order_break) mech[M_OUT_OF_ORDER]++;
        end else begin
          exp_st = ST_FRAG_PENDING;
        end
      end
    end

    // result: four clock edges after the last word
    lat = 0;
    while (!res_valid && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 4, $sformatf("result latency %0d clocks, expected 4", lat));
    check(res.status == exp_st, $sformatf("status %s, expected %s", res.status.name(), exp_st.name()));
    if (exp_st == ST_BAD) mech[M_BAD_DETECTED]++;
    if (exp_st == ST_NOT_L4) mech[M_NOT_L4]++;
    if (exp_st == ST_MALFORMED) mech[M_MALFORMED]++;
    if (exp_st != ST_NOT_L4 && exp_st != ST_MALFORMED) begin
      check(res.ipv6 == f.p.v6, "ip version");
      check(res.fragment == f.frag, "fragment flag");
      check(res.proto == f.p.proto, "protocol");
      check(32'(res.l4_len) == exp_len, $sformatf("length %0d, expected %0d", res.l4_len, exp_len));
      if (f.p.proto == PROTO_TCP) mech[M_TCP]++; else mech[M_UDP]++;
      if (f.p.v6) mech[M_V6]++; else mech[M_V4]++;
    end
    if (exp_sum_chk)
      check(res.sum == exp_sum || (res.sum == 16'hFFFF && exp_sum == 16'h0000),
            $sformatf("sum %h, expected %h", res.sum, exp_sum));
    if (exp_slot >= 0) check(32'(res.slot) == exp_slot, "memory place");
    check(!busy, "ready for the next packet in the fifth cycle");
    for (int i = 0; i < NSLOT; i++) check(occupied[i] == (slots[i] != null), "occupied places");
    // returns at the negedge after the result: the next frame starts in the
    // fifth cycle after this one's last word, the shortest gap allowed
  endtask

  // a result lasts one clock
  logic res_valid_d = 1'b0;
  always @(posedge clk) begin
    res_valid_d <= res_valid;
    if (res_valid && res_valid_d) begin
      failures++;
      $display("FAIL at %0t: result valid for two clocks", $time);
    end
  end

  // send a list of frames back to back with the minimum gap
  task automatic send_all(ref Frame q[$]);
    foreach (q[i]) send(q[i]);
  endtask

  function automatic void shuffle(ref Frame q[$]);
    for (int i = q.size() - 1; i > 0; i--) begin
      int j = $urandom_range(0, i);
      Frame t = q[i]; q[i] = q[j]; q[j] = t;
    end
  endfunction

  int n_iter = 200;

  initial begin
    Frame q[$];
    Pkt p, p2, p3;
    Frame f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int it = 0; it < n_iter; it++) begin
      // whole packets, both versions, both protocols, options, odd sizes
      for (int k = 0; k < 4; k++) begin
        bit v6;
        int opt;
        v6 = k[0];
        opt = $urandom_range(0, 3);
        p = new_pkt(v6, k[1] ? PROTO_TCP : PROTO_UDP, $urandom_range(k[1] ? 20 : 8, 300), $urandom_range(0, 4) == 0);
        if (v6 && opt > 2) opt = 2;
        if (opt > 0) begin if (v6) mech[M_V6_EXT]++; else mech[M_V4_OPTIONS]++; end
        q.delete(); q.push_back(whole(p, opt)); send_all(q);
      end
      // one fragmented packet, fragments shuffled
      p = new_pkt(1'($urandom_range(0, 1)), ($urandom_range(0, 1) == 1) ? PROTO_TCP : PROTO_UDP,
                  $urandom_range(40, 400), $urandom_range(0, 3) == 0);
      q.delete(); fragment(p, $urandom_range(2, 4), q); shuffle(q); send_all(q);
      // a last fragment of a single word, sent first or last
      begin
        int len = 8 * $urandom_range(2, 6) + $urandom_range(1, 4);
        int tail = len % 8;
        p = new_pkt(1'($urandom_range(0, 1)), PROTO_UDP, len, $urandom_range(0, 3) == 0);
        q.delete();
        if (p.v6) begin
          q.push_back(v6_frame(p, 0, 1'b1, 0, len - tail, 1'b1));
          q.push_back(v6_frame(p, 1, 1'b1, len - tail, tail, 1'b0));
        end else begin
          q.push_back(v4_frame(p, 5, 0, len - tail, 1'b1));
          q.push_back(v4_frame(p, 6, len - tail, tail, 1'b0));
        end
        p.n_frags_left = 2;
        shuffle(q); send_all(q);
      end
      // two fragmented packets interleaved
      p  = new_pkt(1'($urandom_range(0, 1)), PROTO_UDP, $urandom_range(40, 300), 1'b0);
      p2 = new_pkt(1'($urandom_range(0, 1)), PROTO_TCP, $urandom_range(40, 300), $urandom_range(0, 3) == 0);
      q.delete(); fragment(p, 3, q); fragment(p2, 3, q); shuffle(q); send_all(q);
    end

    // memory full: two packets waiting, a third one finds no place
    p  = new_pkt(1'b0, PROTO_UDP, 64, 1'b0);
    p2 = new_pkt(1'b1, PROTO_TCP, 80, 1'b0);
    p3 = new_pkt(1'b0, PROTO_TCP, 48, 1'b0);
    begin
      Frame a[$], b2[$], c[$];
      fragment(p, 2, a); fragment(p2, 2, b2); fragment(p3, 2, c);
      q.delete();
      q.push_back(a[0]); q.push_back(b2[1]); q.push_back(c[0]); q.push_back(a[1]); q.push_back(b2[0]);
      send_all(q);
    end

    // the reassembly unit gives up on a packet and frees its place
    p = new_pkt(1'b1, PROTO_UDP, 64, 1'b0);
    q.delete(); fragment(p, 2, q); q.pop_back(); send_all(q);
    check(occupied[0] == 1'b1, "place taken before drop");
    ra_drop = 1'b1; ra_drop_slot = '0;
    @(negedge clk);
    ra_drop = 1'b0;
    @(negedge clk);
    check(occupied == '0, "place freed by the reassembly unit");
    slots[0] = null;
    mech[M_RA_DROP]++;

    // not TCP/UDP: ICMP over IPv4 and IPv6
    p = new_pkt(1'b0, 8'd1, 40, 1'b0);
    f = whole(p, 0); f.not_l4 = 1; q.delete(); q.push_back(f); send_all(q);
    p = new_pkt(1'b1, 8'd58, 40, 1'b0);
    f = whole(p, 1); f.not_l4 = 1; q.delete(); q.push_back(f); send_all(q);
    // frame shorter than the IP length says
    p = new_pkt(1'b0, PROTO_TCP, 120, 1'b0);
    f = whole(p, 0); f.truncated = 1; q.delete(); q.push_back(f); send_all(q);

    // IPv6 atomic fragment: fragment header with offset 0 and M clear
    for (int i = 0; i < 4; i++) begin
      p = new_pkt(1'b1, (i % 2 == 1) ? PROTO_TCP : PROTO_UDP, $urandom_range(20, 200), i == 3);
      q.delete(); q.push_back(v6_frame(p, i % 2, 1'b1, 0, p.l4.size(), 1'b0)); send_all(q);
      mech[M_ATOMIC]++;
    end

    // a fixed IPv4/UDP packet whose checksum was computed by hand: 37 bytes,
    // 9 data bytes (odd), UDP checksum 0xA09D; then the same with one data
    // byte raised by one, which must leave a sum of 0x0100
    for (int v = 0; v < 2; v++) begin
      bit [8*37-1:0] gold = 296'h450000251c46400040119c69c0a80001c0a800c7123400350011a09d636865636b73756d21;
      p = new;
      p.v6 = 1'b0; p.proto = PROTO_UDP; p.id = 32'h1c46;
      p.src = {96'h0, 32'hc0a80001}; p.dst = {96'h0, 32'hc0a800c7};
      p.bad = (v == 1);
      f = new;
      f.p = p; f.flen = 17;
      for (int i = 0; i < 37; i++) f.b.push_back(gold[8*(36-i) +: 8]);
      if (v == 1) f.b[36] = f.b[36] + 8'd1;
      for (int i = 20; i < 37; i++) p.l4.push_back(f.b[i]);
      q.delete(); q.push_back(f); send_all(q);
      check(res.sum == ((v == 0) ? 16'hFFFF : 16'h0100), $sformatf("fixed packet %0d sum %h", v, res.sum));
      check(res.status == ((v == 0) ? ST_OK : ST_BAD) && res.l4_len == 16'd17, "fixed packet status and length");
      mech[M_GOLDEN]++;
    end

    // a good packet after all that
    p = new_pkt(1'b1, PROTO_TCP, 101, 1'b0);
    q.delete(); q.push_back(whole(p, 2)); send_all(q);

    for (int m = 0; m < M_NUM; m++) begin
      $display("  %-32s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism never exercised: %s", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
