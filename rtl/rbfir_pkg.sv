// Shared constants of the redundant-binary FIR filters.
//
// A radix-2 redundant (signed-digit) number is carried as two unsigned bit
// vectors, X = X+ - X-, so every digit x_i = x_i+ - x_i- is in {-1, 0, 1}.
// The widths below are the ones of the 3-tap filter: a 4-digit redundant
// input sample, 4-bit unsigned coefficients (the 9-bit two's complement product width
// follows from these) and a 10-bit output.
package rbfir_pkg;
  localparam int unsigned X_DIGITS = 4;   // digits of the filter input x(n)
  localparam int unsigned COEF_W   = 4;   // bits of each coefficient
  localparam int unsigned OUT_W    = 10;  // bits of the filter output
endpackage
