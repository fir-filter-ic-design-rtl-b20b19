// Recoder of one redundant multiplier digit b_j = b_j+ - b_j-.
//
// Produces the magnitude |b_j| = b+ xor b- and the sign
// sign(b_j) = (not b+) and b-, so -1 -> (sign 1, mag 1), 0 -> (0, 0) for
// both codes of zero, +1 -> (0, 1). Combinational; the gate set (xor,
// inverter, and) follows the cell design.
module bj_recoder (
  input  logic b_p,
  input  logic b_m,
  output logic mod_b,
  output logic sign_b
);
  always_comb begin
    mod_b  = b_p ^ b_m;
    sign_b = ~b_p & b_m;
  end
endmodule
