// tb_length_counter: directed and random checks of the length counter.
// IPv4: cnt = total length - 4*IHL and hdr = IHL-1 after LC_LOAD_V4.
// IPv6: payload length load, extension-header subtraction in 8-byte units,
// the fragment-header case and the too-long flag.  Payload: flen capture,
// 4-byte steps with saturation and the byte mask of the last word.
// Fragments: 8*offset + length, and the received-bytes sum with fend.
module tb_length_counter;
  import tucfp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  len_op_e     op = LC_HOLD;
  logic [31:0] data = '0;
  logic        frag_hdr = 1'b0;
  logic [12:0] frag_offset = '0;
  logic [15:0] acc_len = '0;
  logic [15:0] cnt, flen, fend;
  logic [3:0]  hdr, byte_mask;
  logic        ext_too_long;
  int checks = 0, failures = 0;

  length_counter dut (.*);

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
      if (failures < 20) $display("FAIL: %s (cnt=%0d hdr=%0d flen=%0d fend=%0d mask=%b)", what, cnt, hdr, flen, fend, byte_mask);
    end
  endtask

  task automatic do_op(input len_op_e o);
    op = o;
    @(negedge clk);
    op = LC_HOLD;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // IPv4, IHL 6, total 100
    data = {4'd4, 4'd6, 8'h00, 16'd100};
    do_op(LC_LOAD_V4);
    check(cnt == 16'd76 && hdr == 4'd5, "ipv4 load");
    do_op(LC_HDR_DEC);
    check(hdr == 4'd4, "header decrement");
    check(byte_mask == 4'b1111, "full mask");
    do_op(LC_PAY_FIRST);
    check(flen == 16'd76 && cnt == 16'd72, "first payload word");
    for (int i = 0; i < 17; i++) do_op(LC_PAYLOAD);
    check(cnt == 16'd4 && byte_mask == 4'b1111, "last full word");
    do_op(LC_PAYLOAD);
    check(cnt == 16'd0 && byte_mask == 4'b0000, "saturated at zero");
    do_op(LC_PAYLOAD);
    check(cnt == 16'd0, "stays at zero");
    frag_offset = 13'd10;
    do_op(LC_FRAG_END);
    check(cnt == 16'd156, "fragment end = 8*offset + length");
    acc_len = 16'd200;
    do_op(LC_ACC_LEN);
    check(cnt == 16'd276 && fend == 16'd156, "received bytes and fragment end");

    // odd lengths: masks of a partial last word
    for (int r = 1; r <= 3; r++) begin
      data = {4'd4, 4'd5, 8'h00, 16'(20 + 8 + r)};
      do_op(LC_LOAD_V4);
      do_op(LC_PAY_FIRST);
      do_op(LC_PAYLOAD);
      check(cnt == 16'(r), "remainder");
      check(byte_mask == (4'b1111 << (4 - r)), $sformatf("mask for %0d bytes", r));
    end

    // IPv6: payload length 300, hop-by-hop of 24 bytes, fragment header
    data = {16'd300, 8'd0, 8'd64};
    do_op(LC_LOAD_V6);
    check(cnt == 16'd300 && hdr == 4'd8, "ipv6 load");
    data = {8'd44, 8'd2, 16'h0000};
    frag_hdr = 1'b0;
    #1;
    check(!ext_too_long, "24-byte header accepted");
    do_op(LC_EXT);
    check(cnt == 16'd276 && hdr == 4'd5, "extension header subtracted");
    data = {8'd17, 8'd99, 16'h1234};
    frag_hdr = 1'b1;
    #1;
    check(!ext_too_long, "fragment header accepted");
    do_op(LC_EXT);
    check(cnt == 16'd268 && hdr == 4'd1, "fragment header subtracted");
    frag_hdr = 1'b0;
    data = {8'd6, 8'd8, 16'h0000};
    #1;
    check(ext_too_long, "72-byte header flagged");
    data = {8'd6, 8'd7, 16'h0000};
    #1;
    check(!ext_too_long, "64-byte header accepted");

    // random IPv4 loads
    for (int i = 0; i < 2000; i++) begin
      int ihl = $urandom_range(5, 15);
      int tot = $urandom_range(ihl * 4, 65535);
      data = {4'd4, 4'(ihl), 8'($urandom), 16'(tot)};
      do_op(LC_LOAD_V4);
      check(cnt == 16'(tot - 4 * ihl) && hdr == 4'(ihl - 1), "random ipv4 load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
