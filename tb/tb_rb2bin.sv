// Self-checking testbench of the redundant-to-binary converter: every pair
// of 4-bit X+ and X- (256 cases); y read as a 5-bit two's complement number
// must equal X+ - X-.
module tb_rb2bin;
  localparam int W = 4;
  logic [W-1:0] x_p, x_m;
  logic [W:0]   y;
  int checks = 0, failures = 0;

  rb2bin dut (.x_p(x_p), .x_m(x_m), .y(y));

  initial begin
    for (int v = 0; v < (1 << (2 * W)); v++) begin
      {x_p, x_m} = (2 * W)'(v);
      #1;
      checks++;
      if (int'($signed(y)) != int'(x_p) - int'(x_m)) begin
        failures++;
        if (failures < 10) $display("FAIL X+=%0d X-=%0d -> y=%0d", x_p, x_m, $signed(y));
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
