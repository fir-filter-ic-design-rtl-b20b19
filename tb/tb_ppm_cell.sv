// Self-checking testbench of the PPM cell: all eight input combinations,
// checking x+ - x- + y = 2*t+ - u- and the parity of u-.
module tb_ppm_cell;
  logic x_p, x_m, y, t_p, u_m;
  int checks = 0, failures = 0;

  ppm_cell dut (.x_p(x_p), .x_m(x_m), .y(y), .t_p(t_p), .u_m(u_m));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x_p, x_m, y} = 3'(v);
      #1;
      checks++;
      if (int'(x_p) - int'(x_m) + int'(y) != 2 * int'(t_p) - int'(u_m)) begin
        failures++;
        $display("FAIL ppm x+=%0d x-=%0d y=%0d -> t+=%0d u-=%0d", x_p, x_m, y, t_p, u_m);
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
