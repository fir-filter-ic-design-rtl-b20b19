// Partial-product bit of the redundant multiplier.
//
// p = (a_i xor sign(b_j)) and |b_j|: a_i when b_j = +1, the complement of
// a_i when b_j = -1 (the +1 that completes the negation is added as a carry
// in the multiplier row), and 0 when b_j = 0. Combinational.
module pp_cell (
  input  logic a,
  input  logic sign_b,
  input  logic mod_b,
  output logic p
);
  assign p = (a ^ sign_b) & mod_b;
endmodule
