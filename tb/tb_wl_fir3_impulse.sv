// Workload: impulse response of the 3-tap filter at the top level.
//
// For every coefficient code 0..15 on all three taps (code 8 is the 0.125
// of the coefficient table) and for impulses of every amplitude -15..15,
// each written in several redundant codes, the filter is cleared with S,
// given one nonzero sample followed by zeros, and must answer
// c0*x, c0*x, c0*x, 0, 0: the impulse response is the coefficient list,
// one tap per clock, scaled by the amplitude.
module tb_wl_fir3_impulse;
  logic clk = 1'b0, s_n;
  logic [3:0] x_p, x_m, coef;
  logic [9:0] y;
  int checks = 0, failures = 0;

  rbfir_top dut (
    .clk(clk), .s_n(s_n),
    .fir3_x_p(x_p), .fir3_x_m(x_m), .fir3_coef_a(coef), .fir3_coef_b(coef), .fir3_coef_c(coef),
    .fir3_y(y),
    .bc_x_p(4'd0), .bc_x_m(4'd0), .bc_s_p(), .bc_s_m(),
    .pa_x_p(4'd0), .pa_x_m(4'd0), .pa_y(4'd0), .pa_s_p(), .pa_s_m(),
    .ms_x_p(4'd0), .ms_x_m(4'd0), .ms_y(4'd0), .ms_s_p(), .ms_s_m(),
    .ls_x_p(1'b0), .ls_x_m(1'b0), .ls_y(1'b0), .ls_s_p(), .ls_s_m());

  always #5 clk = ~clk;

  initial begin
    s_n = 1'b1; x_p = '0; x_m = '0; coef = '0;
    for (int c = 0; c < 16; c++) begin
      coef = 4'(c);
      for (int code = 0; code < 256; code++) begin
        int amp;
        @(negedge clk);
        s_n = 1'b0; #1; s_n = 1'b1;           // empty the delay registers
        {x_p, x_m} = 8'(code);
        amp = int'(x_p) - int'(x_m);
        for (int n = 0; n < 5; n++) begin
          #1;
          checks++;
          if ($signed(y) != 10'((n < 3) ? c * amp : 0)) begin
            failures++;
            if (failures < 10) $display("FAIL coef=%0d amp=%0d n=%0d y=%0d", c, amp, n, $signed(y));
          end
          @(negedge clk);
          x_p = '0; x_m = '0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
