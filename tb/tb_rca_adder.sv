// Self-checking testbench of the 9-bit ripple adder: corner cases and random
// pairs of 9-bit two's complement words; s must be their exact 10-bit sum.
module tb_rca_adder;
  localparam int W = 9;
  logic [W-1:0] a, b;
  logic [W:0]   s;
  int checks = 0, failures = 0;

  rca_adder dut (.a(a), .b(b), .s(s));

  task automatic check(input logic [W-1:0] av, input logic [W-1:0] bv);
    a = av; b = bv;
    #1;
    checks++;
    if (int'($signed(s)) != int'($signed(a)) + int'($signed(b))) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d -> %0d", $signed(a), $signed(b), $signed(s));
    end
  endtask

  initial begin
    check(9'h0FF, 9'h0FF);   // 255 + 255
    check(9'h100, 9'h100);   // -256 + -256
    check(9'h1FF, 9'h001);   // -1 + 1
    check(9'h0FF, 9'h100);
    for (int i = 0; i < 2000; i++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
