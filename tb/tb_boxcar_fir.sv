// Self-checking testbench of the 4-lane box-car filter: four independent
// random digit streams; each lane's output stream must be 15 times its own
// input stream, four clocks of flush after the last digit.
module tb_boxcar_fir;
  localparam int L     = 4;
  localparam int N     = 8;
  localparam int FLUSH = 4;
  localparam int WORDS = 200;
  logic clk = 1'b0, s_n;
  logic [L-1:0] x_p, x_m, s_p, s_m;
  int checks = 0, failures = 0;

  boxcar_fir dut (.clk(clk), .s_n(s_n), .x_p(x_p), .x_m(x_m), .s_p(s_p), .s_m(s_m));

  always #5 clk = ~clk;

  initial begin
    s_n = 1'b0; x_p = '0; x_m = '0;
    repeat (2) @(negedge clk);
    s_n = 1'b1;
    for (int w = 0; w < WORDS; w++) begin
      longint xv [L];
      longint sv [L];
      for (int l = 0; l < L; l++) begin xv[l] = 0; sv[l] = 0; end
      for (int k = 0; k < N + FLUSH; k++) begin
        if (k < N) begin x_p = L'($urandom); x_m = L'($urandom); end
        else       begin x_p = '0; x_m = '0; end
        #1;
        for (int l = 0; l < L; l++) begin
          xv[l] += (longint'(x_p[l]) - longint'(x_m[l])) <<< k;
          sv[l] += (longint'(s_p[l]) - longint'(s_m[l])) <<< k;
        end
        @(negedge clk);
      end
      for (int l = 0; l < L; l++) begin
        checks++;
        if (sv[l] != 15 * xv[l]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d lane %0d: X=%0d S=%0d", w, l, xv[l], sv[l]);
        end
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
