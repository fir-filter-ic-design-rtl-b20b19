// Self-checking testbench of the 4-digit parallel PPM adder: every
// combination of X+, X- and Y (4096 cases); the value of S+ - S- must equal
// X+ - X- + Y, and the constant digits s_0+ and s_4- must be 0.
module tb_ppm_adder_par;
  localparam int W = 4;
  logic [W-1:0] x_p, x_m, y;
  logic [W:0]   s_p, s_m;
  int checks = 0, failures = 0;

  ppm_adder_par dut (.x_p(x_p), .x_m(x_m), .y(y), .s_p(s_p), .s_m(s_m));

  initial begin
    for (int v = 0; v < (1 << (3 * W)); v++) begin
      {x_p, x_m, y} = (3 * W)'(v);
      #1;
      checks++;
      if (int'(s_p) - int'(s_m) != int'(x_p) - int'(x_m) + int'(y) || s_p[0] || s_m[W]) begin
        failures++;
        if (failures < 10) $display("FAIL X+=%0d X-=%0d Y=%0d -> S+=%0d S-=%0d", x_p, x_m, y, s_p, s_m);
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
