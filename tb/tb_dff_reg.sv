// Self-checking testbench of the 9-bit D-FF register: random words appear
// at q one clock after d; S low clears the word.
module tb_dff_reg;
  localparam int W = 9;
  logic clk = 1'b0, s_n;
  logic [W-1:0] d, q, exp_q;
  int checks = 0, failures = 0;

  dff_reg dut (.clk(clk), .s_n(s_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    s_n = 1'b0; d = '1;
    @(negedge clk);
    checks++; if (q != '0) begin failures++; $display("FAIL clear"); end
    s_n = 1'b1;
    for (int i = 0; i < 50; i++) begin
      d = W'($urandom);
      exp_q = d;
      @(negedge clk);
      checks++;
      if (q != exp_q) begin failures++; $display("FAIL q=%h exp=%h", q, exp_q); end
    end
    s_n = 1'b0; #1;
    checks++; if (q != '0) begin failures++; $display("FAIL clear 2"); end
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
