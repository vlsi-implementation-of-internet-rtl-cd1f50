// tb_tucfp_linerate: the checksum page at 10 Gigabit Ethernet line rate.
//
// Sends a burst of packets with no in_valid stall, spaced the way a
// 10 Gb/s Ethernet link delivers them at 32 bits per clock (312.5 MHz):
// the IP packet plus 38 bytes of link overhead (14 header, 4 FCS, 8
// preamble, 12 inter-frame gap), i.e. the smallest spacing a real link can
// produce.  Packet sizes alternate between the smallest (46-byte IP packet,
// 64-byte frame) and the largest (1500-byte IP packet) standard frames, over
// IPv4 and IPv6, TCP and UDP.  Every packet must be reported correct, no
// result may be lost, and the page must be idle whenever the next packet
// starts.  The burst is then repeated with the page's own minimum gap (four
// idle clocks), and the link bytes carried per clock must exceed 4, the
// 10 Gb/s rate at 312.5 MHz.
module tb_tucfp_linerate;
  import tucfp_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              in_valid = 1'b0, in_sop = 1'b0, in_eop = 1'b0;
  logic [31:0]       in_data = '0;
  logic              busy, res_valid;
  result_t           res;
  logic              ra_drop = 1'b0;
  logic [SLOT_W-1:0] ra_drop_slot = '0;
  logic [1:0]        occupied;
  int checks = 0, failures = 0;
  int results = 0, ok_results = 0, busy_at_start = 0;

  tucfp dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (res_valid) begin
    results++;
    if (res.status == ST_OK && res.sum == 16'hFFFF) ok_results++;
  end

  byte unsigned pkt[$];

  function automatic bit [15:0] fold(input bit [31:0] a);
    while (a[31:16] != 0) a = 32'(a[15:0]) + 32'(a[31:16]);
    return a[15:0];
  endfunction

  // IP packet of ip_len bytes carrying TCP or UDP with a correct checksum
  function automatic void build(input bit v6, input bit tcp, input int ip_len);
    int hl = v6 ? 40 : 20;
    int l4 = ip_len - hl;
    bit [31:0] s = 0;
    bit [15:0] ck;
    byte unsigned seg[$];
    byte unsigned hdr[$];
    int ckpos = tcp ? 16 : 6;
    for (int i = 0; i < l4; i++) seg.push_back(8'($urandom));
    seg[ckpos] = 0; seg[ckpos+1] = 0;
    if (v6) begin
      hdr.push_back(8'h60); hdr.push_back(0); hdr.push_back(0); hdr.push_back(0);
      hdr.push_back(8'(l4 >> 8)); hdr.push_back(8'(l4));
      hdr.push_back(tcp ? PROTO_TCP : PROTO_UDP); hdr.push_back(8'd64);
      for (int i = 0; i < 32; i++) hdr.push_back(8'($urandom));
      for (int i = 8; i < 40; i += 2) s += {hdr[i], hdr[i+1]};
    end else begin
      hdr.push_back(8'h45); hdr.push_back(0);
      hdr.push_back(8'(ip_len >> 8)); hdr.push_back(8'(ip_len));
      for (int i = 0; i < 5; i++) hdr.push_back(0);
      hdr.push_back(tcp ? PROTO_TCP : PROTO_UDP);
      hdr.push_back(0); hdr.push_back(0);
      for (int i = 0; i < 8; i++) hdr.push_back(8'($urandom));
      for (int i = 12; i < 20; i += 2) s += {hdr[i], hdr[i+1]};
    end
    s += 32'(tcp ? PROTO_TCP : PROTO_UDP) + 32'(l4);
    for (int i = 0; i < l4; i += 2) s += {seg[i], (i + 1 < l4) ? seg[i+1] : 8'h00};
    ck = ~fold(s);
    seg[ckpos] = ck[15:8]; seg[ckpos+1] = ck[7:0];
    pkt.delete();
    foreach (hdr[i]) pkt.push_back(hdr[i]);
    foreach (seg[i]) pkt.push_back(seg[i]);
  endfunction

  // pass 0: spacing of a 10 Gb/s link; pass 1: the page's own minimum gap
  // of 4 idle clocks, which must still carry more than 4 link bytes a clock
  initial begin
    int sent;
    longint clocks, bytes;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    sent = 0;
    for (int pass = 0; pass < 2; pass++) begin
      clocks = 0; bytes = 0;
      for (int n = 0; n < 64; n++) begin
        int ip_len, nw, gap;
        bit v6, tcp;
        v6 = n[1]; tcp = n[2];
        ip_len = n[0] ? 1500 : ((v6 ? 40 : 20) + (tcp ? 20 : 8));
        if (ip_len < 46) ip_len = 46;
        build(v6, tcp, ip_len);
        nw = (ip_len + 3) / 4;
        gap = (pass == 0) ? (38 + 3) / 4 : 4;
        if (busy) busy_at_start++;
        for (int w = 0; w < nw; w++) begin
          in_valid = 1'b1; in_sop = (w == 0); in_eop = (w == nw - 1);
          for (int k = 0; k < 4; k++) in_data[31-8*k -: 8] = (4*w + k < ip_len) ? pkt[4*w+k] : 8'h00;
          @(negedge clk);
        end
        in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0;
        repeat (gap) @(negedge clk);
        clocks += nw + gap;
        bytes += ip_len + 38;
        sent++;
      end
      $display("pass %0d: %0d link bytes in %0d clocks, %0d.%02d bytes/clock, %0d Mb/s at 312.5 MHz",
               pass, bytes, clocks, bytes / clocks, (bytes * 100 / clocks) % 100, bytes * 8 * 3125 / clocks / 10);
      if (pass == 1) begin
        checks++;
        if (bytes <= 4 * clocks) begin failures++; $display("FAIL: page slower than a 10 Gb/s link"); end
      end
    end
    repeat (8) @(negedge clk);
    checks++; if (results != sent) begin failures++; $display("FAIL: %0d results for %0d packets", results, sent); end
    checks++; if (ok_results != sent) begin failures++; $display("FAIL: %0d of %0d packets reported correct", ok_results, sent); end
    checks++; if (busy_at_start != 0) begin failures++; $display("FAIL: busy at the start of %0d packets", busy_at_start); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
