// Self-checking testbench of the 3-tap transposed FIR filter.
//
// A reference model keeps the last three sample values and computes
// y(n) = a*x(n) + b*x(n-1) + c*x(n-2), wrapped to 10 bits. The filter is
// driven with random 4-digit redundant samples (every code of X+ / X-,
// negative and positive values) and random coefficients, one sample per
// clock, and y is compared every clock. The model keeps, with each past
// sample, the coefficient it was multiplied by when it entered, as the
// transposed form does. Then an impulse (x = 1, then 0)
// with all coefficients 8 (0.125) must give 8, 8, 8, 0: one output per
// tap, one clock apart. S low clears the delay registers.
module tb_fir3_transposed;
  logic clk = 1'b0, s_n;
  logic [3:0] x_p, x_m, ca, cb, cc;
  logic [9:0] y;
  int checks = 0, failures = 0;
  int x0, x1, x2;          // model: x(n), x(n-1), x(n-2)
  int b1, c1, c2;          // model: b(n-1), c(n-1), c(n-2), the coefficients
                           // in force when those samples entered
  logic [9:0] last_y;

  fir3_transposed dut (.clk(clk), .s_n(s_n), .x_p(x_p), .x_m(x_m),
                       .coef_a(ca), .coef_b(cb), .coef_c(cc), .y(y));

  always #5 clk = ~clk;

  function automatic logic [9:0] model();
    return 10'(int'(ca) * x0 + b1 * x1 + c2 * x2);
  endfunction

  task automatic step(input logic [3:0] xp, input logic [3:0] xm);
    x_p = xp; x_m = xm;
    x0 = int'(xp) - int'(xm);
    #1;
    checks++;
    if (y != model()) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d,%0d,%0d coef=%0d,%0d,%0d y=%0d exp=%0d",
                                  x0, x1, x2, ca, cb, cc, $signed(y), $signed(model()));
    end
    last_y = y;
    @(negedge clk);
    x2 = x1; x1 = x0;
    c2 = c1; c1 = int'(cc); b1 = int'(cb);
  endtask

  initial begin
    s_n = 1'b0; x_p = '0; x_m = '0; ca = '0; cb = '0; cc = '0;
    x0 = 0; x1 = 0; x2 = 0; b1 = 0; c1 = 0; c2 = 0;
    repeat (2) @(negedge clk);
    s_n = 1'b1;
    // random coefficients, held for 50 samples at a time
    for (int blk = 0; blk < 40; blk++) begin
      {ca, cb, cc} = 12'($urandom);
      for (int n = 0; n < 50; n++) step(4'($urandom), 4'($urandom));
    end
    // impulse with the coefficient 0.125 on all taps
    ca = 4'd8; cb = 4'd8; cc = 4'd8;
    step(4'd0, 4'd0); step(4'd0, 4'd0); step(4'd0, 4'd0);
    for (int n = 0; n < 4; n++) begin
      if (n == 0) step(4'b0001, 4'b0000);
      else        step(4'b0000, 4'b0000);
      checks++;
      if (last_y != ((n < 3) ? 10'd8 : 10'd0)) begin
        failures++; $display("FAIL impulse response %0d: %0d", n, last_y);
      end
    end
    // S low clears the registers: afterwards y = a*x(n) only
    step(4'b1111, 4'b0000);
    step(4'b1111, 4'b0000);
    s_n = 1'b0; #1; s_n = 1'b1;
    x1 = 0; x2 = 0; b1 = 0; c1 = 0; c2 = 0;
    step(4'b0011, 4'b1000);
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
