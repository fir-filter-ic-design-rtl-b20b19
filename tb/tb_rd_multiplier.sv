// Self-checking testbench of the redundant multiplier: every unsigned 4-bit
// A against every code of the 4-digit redundant B (16 x 256 cases); the
// 9-bit two's complement product must equal A * (B+ - B-).
module tb_rd_multiplier;
  logic [3:0] a, b_p, b_m;
  logic [8:0] s;
  int checks = 0, failures = 0;

  rd_multiplier dut (.a(a), .b_p(b_p), .b_m(b_m), .s(s));

  initial begin
    for (int v = 0; v < (1 << 12); v++) begin
      {a, b_p, b_m} = 12'(v);
      #1;
      checks++;
      if (int'($signed(s)) != int'(a) * (int'(b_p) - int'(b_m))) begin
        failures++;
        if (failures < 10) $display("FAIL A=%0d B=%0d -> %0d", a, int'(b_p) - int'(b_m), $signed(s));
      end
    end
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
