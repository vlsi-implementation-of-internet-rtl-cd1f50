// tb_oc_add16: checks the 1's complement adder against a reference that adds
// in 17 bits and folds the carry back in (RFC 1071 style), for corner cases
// and 200000 random operand pairs.
module tb_oc_add16;
  logic [15:0] a, b, sum;
  int checks = 0, failures = 0;

  oc_add16 dut (.a(a), .b(b), .sum(sum));

  function automatic logic [15:0] ref_add(input logic [15:0] x, input logic [15:0] y);
    logic [16:0] t;
    t = {1'b0, x} + {1'b0, y};
    t = {1'b0, t[15:0]} + {16'b0, t[16]};
    return t[15:0];
  endfunction

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (sum !== ref_add(x, y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", x, y, sum, ref_add(x, y));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000, 16'h0000);
    check(16'hFFFF, 16'h0000);
    check(16'hFFFF, 16'hFFFF);
    check(16'hFFFF, 16'h0001);
    check(16'h8000, 16'h8000);
    check(16'h7FFF, 16'h8000);
    check(16'h7FFF, 16'h8001);
    check(16'h0001, 16'hFFFE);
    for (int i = 0; i < 200000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
