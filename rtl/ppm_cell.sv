// PPM (plus-plus-minus) cell: the redundant binary full adder.
//
// Adds a signed digit x = x+ - x- and an unsigned bit y and writes the result
// as a transfer digit of weight +2 and an interim sum digit of weight -1:
//     x+ - x- + y = 2*t+ - u-
// u- is the parity of the three inputs. t+ is x+ when x+ and x- differ, and
// u- (which then equals y) when they are equal. These equations are those of
// the cell design; the pass-transistor circuit behind them is not modelled.
// Purely combinational, no clock.
module ppm_cell (
  input  logic x_p,   // x+, weight +1
  input  logic x_m,   // x-, weight -1
  input  logic y,     // y+, weight +1
  output logic t_p,   // t+, weight +2
  output logic u_m    // u-, weight -1
);
  logic xd;  // x+ xor x-: the signed digit is nonzero

  always_comb begin
    xd  = x_p ^ x_m;
    u_m = xd ^ y;
    t_p = (x_p & xd) | (u_m & ~xd);
  end
endmodule
