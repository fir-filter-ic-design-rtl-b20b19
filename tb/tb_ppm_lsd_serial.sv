// Self-checking testbench of the digit-serial PPM adder.
//
// Feeds random 8-digit redundant numbers X and unsigned numbers Y, least
// significant digit first, then zero digits. The output digits weighted 2^k
// must sum to X + Y after one flush digit, and later digits must be 0.
module tb_ppm_lsd_serial;
  localparam int N     = 8;
  localparam int WORDS = 300;
  logic clk = 1'b0, s_n;
  logic x_p, x_m, y, s_p, s_m;
  int checks = 0, failures = 0;

  ppm_lsd_serial dut (.clk(clk), .s_n(s_n), .x_p(x_p), .x_m(x_m), .y(y), .s_p(s_p), .s_m(s_m));

  always #5 clk = ~clk;

  initial begin
    s_n = 1'b0; {x_p, x_m, y} = '0;
    repeat (2) @(negedge clk);
    s_n = 1'b1;
    for (int w = 0; w < WORDS; w++) begin
      longint xv = 0, yv = 0, sv = 0, late = 0;
      for (int k = 0; k < N + 3; k++) begin
        if (k < N) {x_p, x_m, y} = 3'($urandom);
        else       {x_p, x_m, y} = '0;
        xv += (longint'(x_p) - longint'(x_m)) <<< k;
        yv += longint'(y) <<< k;
        #1;
        if (k <= N) sv += (longint'(s_p) - longint'(s_m)) <<< k;
        else if (s_p || s_m) late++;
        @(negedge clk);
      end
      checks++;
      if (sv != xv + yv || late != 0) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: X=%0d Y=%0d S=%0d", w, xv, yv, sv);
      end
    end
    // S clears a pending transfer
    {x_p, x_m, y} = 3'b101;   // 1 + 1 stores t+ = 1
    @(negedge clk);
    s_n = 1'b0; {x_p, x_m, y} = '0;
    #1;
    checks++;
    if (s_p || s_m) begin failures++; $display("FAIL S did not clear"); end
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
