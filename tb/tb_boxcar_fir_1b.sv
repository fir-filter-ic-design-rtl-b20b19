// Self-checking testbench of the 1-digit box-car filter.
//
// Random redundant digit streams of 8 digits, least significant first, each
// followed by zero digits. With all four taps equal to 1 and every delay one
// digit position, the output stream read as a number must be
// (1 + 2 + 4 + 8) * X = 15 * X, complete four clocks after the last input
// digit, with zero digits after that.
module tb_boxcar_fir_1b;
  localparam int N     = 8;
  localparam int FLUSH = 4;
  localparam int WORDS = 300;
  logic clk = 1'b0, s_n;
  logic x_p, x_m, s_p, s_m;
  int checks = 0, failures = 0;

  boxcar_fir_1b dut (.clk(clk), .s_n(s_n), .x_p(x_p), .x_m(x_m), .s_p(s_p), .s_m(s_m));

  always #5 clk = ~clk;

  initial begin
    s_n = 1'b0; {x_p, x_m} = '0;
    repeat (2) @(negedge clk);
    s_n = 1'b1;
    for (int w = 0; w < WORDS; w++) begin
      longint xv = 0, sv = 0, late = 0;
      for (int k = 0; k < N + FLUSH + 3; k++) begin
        if (k < N) {x_p, x_m} = 2'($urandom);
        else       {x_p, x_m} = '0;
        xv += (longint'(x_p) - longint'(x_m)) <<< k;
        #1;
        if (k < N + FLUSH) sv += (longint'(s_p) - longint'(s_m)) <<< k;
        else if (s_p || s_m) late++;
        @(negedge clk);
      end
      checks++;
      if (sv != 15 * xv || late != 0) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: X=%0d S=%0d (exp %0d) late=%0d", w, xv, sv, 15 * xv, late);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
