// MMP (minus-minus-plus) cell: the redundant binary subtractor
// (type-2 full adder).
//
// Subtracts an unsigned bit y from a signed digit x = x+ - x- and writes the
// result as a transfer digit of weight -2 and an interim digit of weight +1:
//     x+ - x- - y = -2*t- + u+
// u+ is the parity of the three inputs. t- is x- when x+ and x- differ, and
// u+ (which then equals y) when they are equal. The same cell is used as the
// bit cell of the redundant-to-binary converter. Purely combinational.
module mmp_cell (
  input  logic x_p,   // x+, weight +1
  input  logic x_m,   // x-, weight -1
  input  logic y,     // y-, weight -1
  output logic t_m,   // t-, weight -2
  output logic u_p    // u+, weight +1
);
  logic xd;  // x+ xor x-

  always_comb begin
    xd  = x_p ^ x_m;
    u_p = xd ^ y;
    t_m = (x_m & xd) | (u_p & ~xd);
  end
endmodule
