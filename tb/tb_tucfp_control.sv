// tb_tucfp_control: checks the sequencing of the checksum page's FSM.
// The FSM runs with a real length counter; the calculation unit and the
// memory unit are replaced by values the testbench drives.  For each packet
// the testbench records, cycle by cycle, the calculation-unit operation, the
// snapshot, lookup and memory-write strobes, and compares the recorded trace
// with the sequence the packet format implies:
//   IPv4, no fragment (the document's simplest case): words 0-2 not summed,
//     source and destination summed, payload summed, FIN2 adds protocol and
//     length, no lookup, result four clocks after the last word;
//   IPv4 fragment, memory hit: lookup at the first payload word, FIN2
//     merges with the stored sum, FIN3 updates the place;
//   IPv4 last fragment completing a packet: FIN3 releases, FIN4 adds total;
//   IPv6 with a hop-by-hop header: eight address words summed, extension
//     header skipped;
//   ICMP: nothing summed, status "not TCP/UDP".
module tb_tucfp_control;
  import tucfp_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              in_valid = 1'b0, in_sop = 1'b0, in_eop = 1'b0;
  logic [31:0]       in_data = '0;
  logic              busy;
  logic              calc_clr, ph_capture;
  calc_op_e          calc_op;
  logic [3:0]        calc_mask;
  logic [7:0]        calc_proto;
  logic [15:0]       calc_len, calc_total;
  logic [15:0]       acc = 16'h1111, acc_next = 16'hFFFF;
  len_op_e           lc_op;
  logic              lc_frag_hdr, ext_too_long;
  logic [12:0]       lc_offset;
  logic [15:0]       lc_acc_len, cnt, flen, fend;
  logic [3:0]        hdr, pay_mask;
  logic              lookup, wr_en, wr_alloc, rel_en;
  frag_key_t         key;
  logic              hit = 1'b0, free_avail = 1'b1;
  logic [SLOT_W-1:0] hit_idx = '0, free_idx = '0, wr_idx, rel_idx;
  frag_state_t       rd_state = '0, wr_state;
  logic              res_valid;
  result_t           res;
  int checks = 0, failures = 0;

  tucfp_control dut (.*);
  length_counter u_len (
    .clk, .rst_n, .op(lc_op), .data(in_data), .frag_hdr(lc_frag_hdr), .frag_offset(lc_offset),
    .acc_len(lc_acc_len), .cnt, .hdr, .flen, .fend, .byte_mask(pay_mask), .ext_too_long
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  // one letter per cycle from sop to result: . none, D data, P proto/len,
  // M merge, T total; strobes recorded separately
  string ops, caps, looks, wrs, rels, lcs;
  logic [15:0] seen_len, seen_total;
  logic [7:0]  seen_proto;
  frag_state_t seen_wr;
  logic [SLOT_W-1:0] seen_wr_idx;

  task automatic run(input logic [31:0] w[$], output int lat);
    ops = ""; caps = ""; looks = ""; wrs = ""; rels = ""; lcs = "";
    seen_len = 'x; seen_proto = 'x; seen_wr = '0; seen_wr_idx = '0; seen_total = '0;
    lat = 0;
    foreach (w[i]) begin
      in_valid = 1'b1; in_sop = (i == 0); in_eop = (i == w.size() - 1); in_data = w[i];
      #1;
      record();
      @(negedge clk);
    end
    in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0;
    while (!res_valid && lat < 10) begin
      #1;
      record();
      @(negedge clk);
      lat++;
    end
  endtask

  function automatic void record();
    string c;
    unique case (calc_op)
      OP_DATA:      c = "D";
      OP_PROTO_LEN: c = "P";
      OP_MERGE:     c = "M";
      OP_TOTAL:     c = "T";
      default:      c = ".";
    endcase
    ops = {ops, c};
    unique case (lc_op)
      LC_LOAD_V4:   c = "4";
      LC_LOAD_V6:   c = "6";
      LC_EXT:       c = "E";
      LC_HDR_DEC:   c = "d";
      LC_PAY_FIRST: c = "F";
      LC_PAYLOAD:   c = "p";
      LC_FRAG_END:  c = "X";
      LC_ACC_LEN:   c = "A";
      default:      c = ".";
    endcase
    lcs = {lcs, c};
    if (calc_op == OP_PROTO_LEN) begin seen_len = calc_len; seen_proto = calc_proto; end
    if (calc_op == OP_TOTAL) seen_total = calc_total;
    if (wr_en) begin seen_wr = wr_state; seen_wr_idx = wr_idx; end
    caps = {caps, ph_capture ? "1" : "0"};
    looks = {looks, lookup ? "1" : "0"};
    wrs = {wrs, wr_en ? (wr_alloc ? "A" : "W") : "0"};
    rels = {rels, rel_en ? "1" : "0"};
  endfunction

  function automatic void v4_hdr(ref logic [31:0] w[$], input int total, input bit mf, input int off, input logic [7:0] proto);
    w.push_back({8'h45, 8'h00, 16'(total)});
    w.push_back({16'hABCD, 3'(mf), 13'(off)});
    w.push_back({8'd64, proto, 16'h0000});
    w.push_back(32'hC0A80001);
    w.push_back(32'hC0A80002);
  endfunction

  initial begin
    logic [31:0] w[$];
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // IPv4 UDP, 12 bytes of data: 3 payload words
    w.delete(); v4_hdr(w, 32, 1'b0, 0, PROTO_UDP);
    repeat (3) w.push_back($urandom);
    run(w, lat);
    check(ops == "...DDDDD.P..", {"ipv4 ops ", ops});
    check(caps == "000001000000", {"ipv4 snapshot ", caps});
    check(looks == "000000000000", "no lookup for a whole packet");
    check(lcs == "4ddddFppXA..", {"ipv4 length ops ", lcs});
    check(seen_len == 16'd12 && seen_proto == PROTO_UDP, "ipv4 pseudo header protocol and length");
    check(lat == 4, $sformatf("ipv4 latency %0d", lat));
    check(res.status == ST_OK && !res.fragment && res.l4_len == 16'd12 && res.proto == PROTO_UDP, "ipv4 result");
    check(key.src[31:0] == 32'hC0A80001 && key.dst[31:0] == 32'hC0A80002 && key.id == 32'hABCD, "ipv4 key");
    check(!busy, "idle after the result");
    // wrong sum reported as such
    acc_next = 16'h1234;
    w.delete(); v4_hdr(w, 28, 1'b0, 0, PROTO_TCP);
    repeat (2) w.push_back($urandom);
    run(w, lat);
    check(res.status == ST_BAD && res.sum == 16'h1234, "bad sum reported");
    acc_next = 16'hFFFF;

    // IPv4 first fragment (MF), memory hit on an earlier piece
    hit = 1'b1; hit_idx = 1;
    rd_state = '{partial: 16'h4321, acc_len: 16'd16, total: 16'd0, total_known: 1'b0};
    w.delete(); v4_hdr(w, 36, 1'b1, 0, PROTO_UDP);
    repeat (4) w.push_back($urandom);
    run(w, lat);
    check(ops == "...DDDDDD.M..", {"fragment ops ", ops});
    check(looks == "0000010000000", {"fragment lookup ", looks});
    check(wrs == "00000000000W0", {"fragment update ", wrs});
    check(seen_wr_idx == 1 && seen_wr.partial == acc && seen_wr.acc_len == 16'd32 && !seen_wr.total_known,
          "fragment update contents");
    check(res.status == ST_FRAG_PENDING && res.fragment && res.slot == 1 && res.l4_len == 16'd16, "pending fragment result");

    // IPv4 last fragment completing the packet: 16 stored + 16 here at offset 16
    rd_state = '{partial: 16'h4321, acc_len: 16'd16, total: 16'd0, total_known: 1'b0};
    w.delete(); v4_hdr(w, 36, 1'b0, 2, PROTO_UDP);
    repeat (4) w.push_back($urandom);
    run(w, lat);
    check(ops == "...DDDDDD.M.T", {"completing ops ", ops});
    check(rels == "0000000000010", {"completing release ", rels});
    check(seen_total == 16'd32, "total length added");
    check(res.status == ST_OK && res.l4_len == 16'd32, "completed packet result");
    // a fragment of a new packet allocates a place
    hit = 1'b0; free_idx = 0;
    w.delete(); v4_hdr(w, 36, 1'b1, 0, PROTO_TCP);
    repeat (4) w.push_back($urandom);
    run(w, lat);
    check(ops == "...DDDDDD.P..", {"new fragment ops ", ops});
    check(wrs == "00000000000A0", {"new fragment allocate ", wrs});
    check(seen_len == 16'd0 && seen_proto == PROTO_TCP, "first fragment adds the protocol only");
    check(seen_wr.acc_len == 16'd16 && !seen_wr.total_known, "first fragment stored length");
    // memory full
    free_avail = 1'b0;
    w.delete(); v4_hdr(w, 36, 1'b1, 0, PROTO_TCP);
    repeat (4) w.push_back($urandom);
    run(w, lat);
    check(ops == "...DDDDDD....", {"no place ops ", ops});
    check(res.status == ST_NO_SLOT, "no place result");
    free_avail = 1'b1;

    // IPv6 TCP with a 16-byte hop-by-hop header, 8 bytes of data
    w.delete();
    w.push_back(32'h60000000);
    w.push_back({16'd24, NH_HOP_BY_HOP, 8'd64});
    repeat (8) w.push_back($urandom);
    w.push_back({PROTO_TCP, 8'd1, 16'h0000});
    repeat (3) w.push_back($urandom);
    repeat (2) w.push_back($urandom);
    run(w, lat);
    check(ops == "..DDDDDDDD....DD.P..", {"ipv6 ops ", ops});
    check(lcs == ".6ddddddddEdddFpXA..", {"ipv6 length ops ", lcs});
    check(seen_len == 16'd8 && seen_proto == PROTO_TCP, "ipv6 pseudo header protocol and length");
    check(key.v6 && key.src[127:96] == w[2] && key.src[31:0] == w[5] && key.dst[127:96] == w[6] && key.dst[31:0] == w[9],
          "ipv6 addresses captured");
    check(res.status == ST_OK && res.ipv6 && res.l4_len == 16'd8 && res.proto == PROTO_TCP, "ipv6 result");

    // ICMP: not summed
    w.delete(); v4_hdr(w, 28, 1'b0, 0, 8'd1);
    repeat (2) w.push_back($urandom);
    run(w, lat);
    check(res.status == ST_NOT_L4, "icmp status");
    check(ops == "...DD......", {"icmp ops ", ops});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
