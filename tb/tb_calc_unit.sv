// tb_calc_unit: drives random sequences of calculation-unit operations and
// compares the accumulator, after every clock, with a reference that keeps a
// 32-bit sum and folds it (zero is compared as 0x0000 == 0xFFFF).  Covers
// byte masking, the protocol/length operand, the pseudo-header snapshot and
// its removal (OP_MERGE), the total-length operand, hold and clear.
module tb_calc_unit;
  import tucfp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        clr = 1'b0, ph_capture = 1'b0;
  calc_op_e    op = OP_NONE;
  logic [31:0] data = '0;
  logic [3:0]  byte_mask = '0;
  logic [7:0]  proto = '0;
  logic [15:0] len = '0, partial = '0, total = '0, acc, acc_next;
  int checks = 0, failures = 0;

  calc_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [15:0] fold(input bit [31:0] a);
    while (a[31:16] != 0) a = 32'(a[15:0]) + 32'(a[31:16]);
    return a[15:0];
  endfunction

  function automatic bit same(input bit [15:0] x, input bit [15:0] y);
    return (x == y) || ((x == 16'h0000 || x == 16'hFFFF) && (y == 16'h0000 || y == 16'hFFFF));
  endfunction

  bit [15:0] ref_acc = 0, ref_ph = 0;

  initial begin
    bit [31:0] m;
    bit [31:0] t;
    int sel;
    bit [15:0] nph;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      int r = $urandom_range(0, 99);
      data = $urandom; byte_mask = 4'($urandom); proto = 8'($urandom);
      len = 16'($urandom); partial = 16'($urandom); total = 16'($urandom);
      clr = (r < 3);
      ph_capture = ($urandom_range(0, 9) == 0);
      sel = $urandom_range(0, 5);
      case (sel)
        0: op = OP_NONE;
        1, 2: op = OP_DATA;
        3: op = OP_PROTO_LEN;
        4: op = OP_MERGE;
        default: op = OP_TOTAL;
      endcase
      // reference
      m = data & {{8{byte_mask[3]}}, {8{byte_mask[2]}}, {8{byte_mask[1]}}, {8{byte_mask[0]}}};
      t = 32'(ref_acc);
      unique case (op)
        OP_DATA:      t += 32'(m[31:16]) + 32'(m[15:0]);
        OP_PROTO_LEN: t += 32'(proto) + 32'(len);
        OP_MERGE:     begin nph = ~ref_ph; t += 32'(nph) + 32'(partial); end
        OP_TOTAL:     t += 32'(total);
        default: ;
      endcase
      if (ph_capture) ref_ph = ref_acc;
      ref_acc = clr ? 16'h0000 : fold(t);
      #1;
      checks++;
      if (!same(acc_next, ref_acc)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d op %s: next %h expected %h", i, op.name(), acc_next, ref_acc);
      end
      @(negedge clk);
      checks++;
      if (!same(acc, ref_acc)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: acc %h expected %h", i, acc, ref_acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
