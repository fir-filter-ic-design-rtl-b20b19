// Self-checking testbench of the digit recoder: the four codes of b+ / b-
// against the recoding table (-1 -> sign 1 mag 1, 0 -> 0 0, +1 -> 0 1).
module tb_bj_recoder;
  logic b_p, b_m, mod_b, sign_b;
  int checks = 0, failures = 0;

  bj_recoder dut (.b_p(b_p), .b_m(b_m), .mod_b(mod_b), .sign_b(sign_b));

  initial begin
    for (int v = 0; v < 4; v++) begin
      int bval;
      {b_p, b_m} = 2'(v);
      #1;
      bval = int'(b_p) - int'(b_m);
      checks++;
      if (mod_b != (bval != 0) || sign_b != (bval < 0)) begin
        failures++;
        $display("FAIL recode b=%0d -> mod=%0d sign=%0d", bval, mod_b, sign_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
