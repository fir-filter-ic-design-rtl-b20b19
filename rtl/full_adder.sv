// Binary full adder: a + b + ci = 2*co + s.
//
// The plain carry-propagate cell used in the accumulation rows of the
// redundant multiplier and in the ripple adders of the 3-tap filter.
// Sum is the parity, carry the majority of the inputs. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
