// Multiplier of an unsigned binary A by a redundant binary B.
//
// A (A_W bits, the filter coefficient) is unsigned; B (B_W digits, the
// sample) is a signed-digit number B+ - B-. The product is an
// (A_W+B_W+1)-bit two's complement number: 9 bits for the 4 x 4 case, one
// bit more than a binary 4 x 4 product because B is signed.
//
// How it works:
//   * each digit b_j is recoded into sign(b_j) and |b_j| (bj_recoder);
//   * partial-product bits r_ij = (a_i xor sign(b_j)) and |b_j| (pp_cell):
//     A, ~A or 0;
//   * the value of row j is |b_j| * (+-A) = r_j + sign(b_j) - sign(b_j)*2^A_W.
//     The positive part r_j + sign(b_j) is added at weight 2^j into an
//     accumulator by a row of A_W full adders, sign(b_j) entering as the
//     row's carry in. The negative part, sign(b_j) at weight 2^(j+A_W), is
//     collected as the minus half of a redundant number;
//   * a final MMP chain (rb2bin) subtracts the minus half from the
//     accumulator and delivers the two's complement product.
// The cells, the recoding and the binary output follow the design; the
// exact row arrangement is this design's own. Combinational, no clock.
module rd_multiplier #(
  parameter int unsigned A_W = 4,
  parameter int unsigned B_W = 4
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b_p,
  input  logic [B_W-1:0]     b_m,
  output logic [A_W+B_W:0]   s
);
  localparam int unsigned N = A_W + B_W;

  logic [B_W-1:0] mod_b, sign_b;
  logic [N-1:0]   acc [B_W+1];   // acc[j]: sum of the positive parts of rows < j
  logic [N-1:0]   neg;           // negative parts, one bit per row

  assign acc[0] = '0;

  for (genvar j = 0; j < B_W; j++) begin : g_row
    logic [A_W-1:0] r;     // partial-product bits of row j
    logic [A_W-1:0] sum;
    logic [A_W:0]   cy;    // carry chain of the row

    bj_recoder u_rec (.b_p(b_p[j]), .b_m(b_m[j]), .mod_b(mod_b[j]), .sign_b(sign_b[j]));

    assign cy[0] = sign_b[j];
    for (genvar i = 0; i < A_W; i++) begin : g_col
      pp_cell    u_pp (.a(a[i]), .sign_b(sign_b[j]), .mod_b(mod_b[j]), .p(r[i]));
      full_adder u_fa (.a(acc[j][j+i]), .b(r[i]), .ci(cy[i]), .s(sum[i]), .co(cy[i+1]));
    end

    // Bits j .. j+A_W are replaced by the row result; bit j+A_W of acc[j]
    // is always 0 because acc[j] < 2^(j+A_W).
    localparam logic [N-1:0] MASK = N'({(A_W+1){1'b1}}) << j;
    assign acc[j+1] = (acc[j] & ~MASK) | (N'({cy[A_W], sum}) << j);

    // The row's carry out lands in bit j+A_W, which must still be free.
    always_comb assert final (acc[j][j+A_W] == 1'b0)
      else $error("rd_multiplier: accumulator bit %0d already set", j + A_W);
  end

  assign neg = {sign_b, {A_W{1'b0}}};

  rb2bin #(.W(N)) u_conv (.x_p(acc[B_W]), .x_m(neg), .y(s));
endmodule
