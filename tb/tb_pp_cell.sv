// Self-checking testbench of the partial-product cell: for each a and each
// recoded digit b in {-1, 0, +1}, p must be a, not a, or 0.
module tb_pp_cell;
  logic a, sign_b, mod_b, p;
  int checks = 0, failures = 0;

  pp_cell dut (.a(a), .sign_b(sign_b), .mod_b(mod_b), .p(p));

  initial begin
    for (int av = 0; av < 2; av++) begin
      for (int bv = -1; bv <= 1; bv++) begin
        logic exp_p;
        a      = 1'(av);
        sign_b = (bv < 0);
        mod_b  = (bv != 0);
        #1;
        exp_p = (bv == 0) ? 1'b0 : (bv > 0) ? a : ~a;
        checks++;
        if (p != exp_p) begin
          failures++;
          $display("FAIL pp a=%0d b=%0d -> %0d", a, bv, p);
        end
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
