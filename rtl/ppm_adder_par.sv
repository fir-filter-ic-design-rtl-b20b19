// W-digit carry-free parallel PPM adder.
//
// Adds an unsigned W-bit number Y to a W-digit redundant number X = X+ - X-
// and gives a (W+1)-digit redundant sum S = S+ - S-. Each position has one
// PPM cell; its interim digit u_i- is sum digit s_i-, its transfer t_i+ is
// sum digit s_(i+1)+. s_0+ and s_W- are constant 0. No signal crosses more
// than one digit position, so the delay does not depend on W.
// Combinational.
module ppm_adder_par #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x_p,
  input  logic [W-1:0] x_m,
  input  logic [W-1:0] y,
  output logic [W:0]   s_p,
  output logic [W:0]   s_m
);
  logic [W-1:0] t_p, u_m;

  for (genvar i = 0; i < W; i++) begin : g_dig
    ppm_cell u_ppm (.x_p(x_p[i]), .x_m(x_m[i]), .y(y[i]), .t_p(t_p[i]), .u_m(u_m[i]));
  end

  assign s_p = {t_p, 1'b0};
  assign s_m = {1'b0, u_m};
endmodule
