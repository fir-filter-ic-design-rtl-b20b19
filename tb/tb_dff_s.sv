// Self-checking testbench of the D flip-flop with S pin: Q follows D one
// rising edge later while S is high, and S low forces Q to 0 at once,
// without a clock edge.
module tb_dff_s;
  logic clk = 1'b0, s_n, d, q;
  logic exp_q;
  int checks = 0, failures = 0;

  dff_s dut (.clk(clk), .s_n(s_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    s_n = 1'b0; d = 1'b1;
    #2;
    checks++; if (q != 1'b0) begin failures++; $display("FAIL clear"); end
    @(negedge clk); s_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      d = 1'($urandom_range(0, 1));
      exp_q = d;
      @(negedge clk);
      checks++;
      if (q != exp_q) begin failures++; $display("FAIL cycle %0d q=%0d exp=%0d", i, q, exp_q); end
    end
    // S low between edges clears immediately
    d = 1'b1; @(negedge clk);
    checks++; if (q != 1'b1) begin failures++; $display("FAIL load 1"); end
    #2 s_n = 1'b0; #1;
    checks++; if (q != 1'b0) begin failures++; $display("FAIL async clear"); end
    @(negedge clk);
    checks++; if (q != 1'b0) begin failures++; $display("FAIL hold clear"); end
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
