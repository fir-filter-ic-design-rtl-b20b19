// 4-tap box-car FIR filter for a 1-digit redundant input.
//
// All four coefficients are 1, so the filter is three delays and three
// adders and needs no multiplier:
//     d1 = D(x), d2 = D(d1), d3 = D(d2)
//     s  = ((x + d1) + d2) + d3
// x is one redundant digit (x+, x-) per clock; each delay is a pair of D
// flip-flops and each adder a digit-serial SBD adder, so the adders' own
// transfer digits also move forward one clock per digit. Read as a
// least-significant-digit-first number, the output stream is therefore
// (1 + 2 + 4 + 8) = 15 times the input stream; four clocks of zero input
// after the last digit flush every delay and transfer.
// The adders are chained as in the cell schematic; S low clears every
// flip-flop.
module boxcar_fir_1b (
  input  logic clk,
  input  logic s_n,
  input  logic x_p,
  input  logic x_m,
  output logic s_p,
  output logic s_m
);
  logic [3:0] dp, dm;     // dp[k], dm[k]: input delayed by k clocks
  logic [3:0] ap, am;     // ap[k], am[k]: output of the adder chain after k adders

  assign dp[0] = x_p;
  assign dm[0] = x_m;
  assign ap[0] = x_p;
  assign am[0] = x_m;

  for (genvar k = 1; k < 4; k++) begin : g_tap
    dff_s     u_dp  (.clk(clk), .s_n(s_n), .d(dp[k-1]), .q(dp[k]));
    dff_s     u_dm  (.clk(clk), .s_n(s_n), .d(dm[k-1]), .q(dm[k]));
    sbd_adder u_add (.clk(clk), .s_n(s_n),
                     .x_p(ap[k-1]), .x_m(am[k-1]), .y_p(dp[k]), .y_m(dm[k]),
                     .s_p(ap[k]), .s_m(am[k]));
  end

  assign s_p = ap[3];
  assign s_m = am[3];
endmodule
