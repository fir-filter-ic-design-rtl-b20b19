// Digit-serial PPM adder, least significant digit first.
//
// One PPM cell and one D flip-flop. Each clock a digit x_i = x_i+ - x_i- and
// a bit y_i enter; the sum digit s_i = t_(i-1)+ - u_i- leaves in the same
// clock: u_i- straight from the cell, t_(i-1)+ from the flip-flop that held
// the previous digit's transfer. After the last digit one more clock with
// zero inputs flushes the final transfer. S low clears the flip-flop, which
// starts a new word.
module ppm_lsd_serial (
  input  logic clk,
  input  logic s_n,
  input  logic x_p,
  input  logic x_m,
  input  logic y,
  output logic s_p,
  output logic s_m
);
  logic t_p;

  ppm_cell u_ppm (.x_p(x_p), .x_m(x_m), .y(y), .t_p(t_p), .u_m(s_m));
  dff_s    u_dt  (.clk(clk), .s_n(s_n), .d(t_p), .q(s_p));
endmodule
