// Self-checking testbench of the MMP cell: all eight input combinations,
// checking x+ - x- - y = -2*t- + u+.
module tb_mmp_cell;
  logic x_p, x_m, y, t_m, u_p;
  int checks = 0, failures = 0;

  mmp_cell dut (.x_p(x_p), .x_m(x_m), .y(y), .t_m(t_m), .u_p(u_p));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x_p, x_m, y} = 3'(v);
      #1;
      checks++;
      if (int'(x_p) - int'(x_m) - int'(y) != -2 * int'(t_m) + int'(u_p)) begin
        failures++;
        $display("FAIL mmp x+=%0d x-=%0d y=%0d -> t-=%0d u+=%0d", x_p, x_m, y, t_m, u_p);
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
