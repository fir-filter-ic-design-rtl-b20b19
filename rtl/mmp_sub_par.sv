// W-digit carry-free parallel MMP subtractor.
//
// Subtracts an unsigned W-bit number Y from a W-digit redundant number
// X = X+ - X- and gives a (W+1)-digit redundant difference S = S+ - S-.
// Each position has one MMP cell; its interim digit u_i+ is s_i+, its
// transfer t_i- is s_(i+1)-. s_0- and s_W+ are constant 0. Combinational.
module mmp_sub_par #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x_p,
  input  logic [W-1:0] x_m,
  input  logic [W-1:0] y,
  output logic [W:0]   s_p,
  output logic [W:0]   s_m
);
  logic [W-1:0] t_m, u_p;

  for (genvar i = 0; i < W; i++) begin : g_dig
    mmp_cell u_mmp (.x_p(x_p[i]), .x_m(x_m[i]), .y(y[i]), .t_m(t_m[i]), .u_p(u_p[i]));
  end

  assign s_p = {1'b0, u_p};
  assign s_m = {t_m, 1'b0};
endmodule
