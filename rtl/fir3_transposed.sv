// 3-tap FIR filter in transposed (data-broadcast) form:
//     y(n) = a*x(n) + b*x(n-1) + c*x(n-2)
//
// The input sample x(n) is a 4-digit redundant binary number (X+ - X-, range
// -15..15); the three coefficients are 4-bit unsigned numbers (a fraction
// with weight 1/64 per LSB if read as in the coefficient table, so 8 means
// 0.125). The sample is broadcast to three redundant multipliers, each
// giving a 9-bit two's complement product. The product c*x goes through a
// 9-bit D-FF register, is added to b*x by a 9-bit ripple adder, the 10-bit
// sum goes through a second register and is added to a*x. The critical path
// is one multiplier plus one adder.
//
// Timing: y responds combinationally to x(n) and to the registers, which
// load on the rising clock edge; one sample per clock. S low clears both
// registers (the state then equals all-zero past samples).
//
// Output: Y_W = 10 bits, two's complement. The exact sum needs 11 bits only
// when |y| > 511 (possible only with large coefficients and inputs); then
// y wraps modulo 2^10. Sizing the second register and adder at 10 bits,
// one more than the product, is this design's choice.
module fir3_transposed
  import rbfir_pkg::*;
#(
  parameter int unsigned X_W = X_DIGITS,
  parameter int unsigned C_W = COEF_W,
  parameter int unsigned Y_W = OUT_W
) (
  input  logic           clk,
  input  logic           s_n,
  input  logic [X_W-1:0] x_p,
  input  logic [X_W-1:0] x_m,
  input  logic [C_W-1:0] coef_a,
  input  logic [C_W-1:0] coef_b,
  input  logic [C_W-1:0] coef_c,
  output logic [Y_W-1:0] y
);
  localparam int unsigned P_W = C_W + X_W + 1;   // product width, 9

  logic [P_W-1:0] pa, pb, pc, pc_q;
  logic [P_W:0]   sum1, sum1_q;
  logic [P_W+1:0] sum2;

  rd_multiplier #(.A_W(C_W), .B_W(X_W)) u_mul_a (.a(coef_a), .b_p(x_p), .b_m(x_m), .s(pa));
  rd_multiplier #(.A_W(C_W), .B_W(X_W)) u_mul_b (.a(coef_b), .b_p(x_p), .b_m(x_m), .s(pb));
  rd_multiplier #(.A_W(C_W), .B_W(X_W)) u_mul_c (.a(coef_c), .b_p(x_p), .b_m(x_m), .s(pc));

  dff_reg   #(.W(P_W))   u_reg_c (.clk(clk), .s_n(s_n), .d(pc), .q(pc_q));
  rca_adder #(.W(P_W))   u_add_1 (.a(pb), .b(pc_q), .s(sum1));
  dff_reg   #(.W(P_W+1)) u_reg_1 (.clk(clk), .s_n(s_n), .d(sum1), .q(sum1_q));
  rca_adder #(.W(P_W+1)) u_add_2 (.a({pa[P_W-1], pa}), .b(sum1_q), .s(sum2));

  assign y = sum2[Y_W-1:0];
endmodule
