// Ripple-carry adder of two W-bit two's complement words (the 9-FA of the
// 3-tap filter).
//
// A chain of W full adders with carry in 0. The extra sum bit s[W] is the
// sign of the exact result, a[W-1] xor b[W-1] xor carry out, so s is the
// full (W+1)-bit two's complement sum and never overflows. Combinational.
module rca_adder #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   s
);
  logic [W:0] c;

  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign s[W] = a[W-1] ^ b[W-1] ^ c[W];
endmodule
