// Digit-serial signed-binary-digit (SBD) adder of two redundant numbers.
//
// Adds X = X+ - X- and Y = Y+ - Y-, one digit of each per clock, least
// significant digit first, and outputs the sum one redundant digit per clock.
//   PPM:  x+ - x- + y+          = 2*t+ - u-
//   MMP:  t+(prev) - u- - y-    = -2*t- + u+
//   out:  s+ = u+,  s- = t-(prev)
// Both transfer digits go through a D flip-flop into the next digit
// position, so no signal runs along the word and the combinational path is
// one PPM plus one MMP cell. Sum digit i appears in the clock of input digit
// i; one clock of zero input after the last digit flushes both transfers.
// S low clears both flip-flops.
module sbd_adder (
  input  logic clk,
  input  logic s_n,
  input  logic x_p,
  input  logic x_m,
  input  logic y_p,
  input  logic y_m,
  output logic s_p,
  output logic s_m
);
  logic t_p, t_p_q, u_m, t_m;

  ppm_cell u_ppm (.x_p(x_p), .x_m(x_m), .y(y_p), .t_p(t_p), .u_m(u_m));
  dff_s    u_dp  (.clk(clk), .s_n(s_n), .d(t_p), .q(t_p_q));
  // MMP: plus input is the delayed t+, the two minus inputs are u- and y-.
  mmp_cell u_mmp (.x_p(t_p_q), .x_m(u_m), .y(y_m), .t_m(t_m), .u_p(s_p));
  dff_s    u_dm  (.clk(clk), .s_n(s_n), .d(t_m), .q(s_m));
endmodule
