// Self-checking testbench of the digit-serial SBD adder.
//
// Feeds pairs of random 8-digit redundant numbers, least significant digit
// first, one digit per clock, followed by zero digits. The output digits,
// weighted 2^k by the clock k in which they appear, must sum to X + Y; the
// sum must be complete after one flush digit (digit 8), and every later
// digit must be 0. S is pulsed low once between words to check that it
// empties the transfer flip-flops.
module tb_sbd_adder;
  localparam int N     = 8;   // digits per word
  localparam int WORDS = 300;
  logic clk = 1'b0, s_n;
  logic x_p, x_m, y_p, y_m, s_p, s_m;
  int checks = 0, failures = 0;

  sbd_adder dut (.clk(clk), .s_n(s_n), .x_p(x_p), .x_m(x_m), .y_p(y_p), .y_m(y_m),
                 .s_p(s_p), .s_m(s_m));

  always #5 clk = ~clk;

  initial begin
    s_n = 1'b0; {x_p, x_m, y_p, y_m} = '0;
    repeat (2) @(negedge clk);
    s_n = 1'b1;
    for (int w = 0; w < WORDS; w++) begin
      longint xv = 0, yv = 0, sv = 0, late = 0;
      for (int k = 0; k < N + 4; k++) begin
        if (k < N) begin
          {x_p, x_m, y_p, y_m} = 4'($urandom);
        end else begin
          {x_p, x_m, y_p, y_m} = '0;
        end
        xv += (longint'(x_p) - longint'(x_m)) <<< k;
        yv += (longint'(y_p) - longint'(y_m)) <<< k;
        #1;
        if (k <= N) sv += (longint'(s_p) - longint'(s_m)) <<< k;
        else if (s_p || s_m) late++;
        @(negedge clk);
      end
      checks++;
      if (sv != xv + yv || late != 0) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: X=%0d Y=%0d S=%0d late=%0d", w, xv, yv, sv, late);
      end
      if (w == WORDS / 2) begin
        // leave a transfer pending, then clear it with S
        {x_p, x_m, y_p, y_m} = 4'b1010;   // 1 + 1: t+ = 1 is stored
        @(negedge clk);
        s_n = 1'b0; {x_p, x_m, y_p, y_m} = '0;
        #1;
        checks++;
        if (s_p || s_m) begin failures++; $display("FAIL S did not clear"); end
        @(negedge clk); s_n = 1'b1;
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
