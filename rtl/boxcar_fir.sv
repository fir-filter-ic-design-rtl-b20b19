// 4-tap box-car FIR filter for a multi-digit redundant input.
//
// LANES independent copies of the 1-digit box-car filter, one per input
// digit position, sharing clock and S. That the multi-digit filter is made
// of side-by-side copies is this design's reading (the 4-digit version
// dissipates exactly four times the power of the 1-digit one); no digit
// lane interacts with another. Timing as in boxcar_fir_1b.
module boxcar_fir #(
  parameter int unsigned LANES = 4
) (
  input  logic             clk,
  input  logic             s_n,
  input  logic [LANES-1:0] x_p,
  input  logic [LANES-1:0] x_m,
  output logic [LANES-1:0] s_p,
  output logic [LANES-1:0] s_m
);
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    boxcar_fir_1b u_bc (.clk(clk), .s_n(s_n), .x_p(x_p[l]), .x_m(x_m[l]),
                        .s_p(s_p[l]), .s_m(s_m[l]));
  end
endmodule
