// Redundant binary to two's complement converter.
//
// Treats X+ and X- as two unsigned W-bit numbers and subtracts X- from X+
// with a chain of MMP cells, least significant digit first:
//     x_i+ - x_i- - c_i = -2*c_(i+1) + y_i,   c_0 = 0
// The final borrow c_W is output as y[W]; it has weight -2^W, so y is the
// (W+1)-bit two's complement value of X+ - X-. This is the one place where a
// borrow ripples through the whole word. Combinational.
module rb2bin #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x_p,
  input  logic [W-1:0] x_m,
  output logic [W:0]   y
);
  logic [W:0] c;  // c[i] is the borrow into position i

  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_bit
    // MMP: the borrow is the second minus input, the cell's t- the next borrow.
    mmp_cell u_mmp (.x_p(x_p[i]), .x_m(x_m[i]), .y(c[i]), .t_m(c[i+1]), .u_p(y[i]));
  end
  assign y[W] = c[W];
endmodule
