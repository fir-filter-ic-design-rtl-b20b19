// Top level: the two redundant-binary filters and the carry-free arithmetic
// structures they are built from, side by side.
//
//   * fir3_*  : 3-tap transposed FIR filter, 4-digit redundant input,
//               4-bit coefficients, 10-bit two's complement output;
//   * bc_*    : 4-tap box-car FIR filter, 4 digit-serial lanes;
//   * pa_*    : 4-digit parallel PPM adder (redundant + unsigned);
//   * ms_*    : 4-digit parallel MMP subtractor (redundant - unsigned);
//   * ls_*    : digit-serial lsd-first PPM adder.
// The units share the clock and the S pin (S low clears every flip-flop)
// but have no data connection between them.
module rbfir_top
  import rbfir_pkg::*;
(
  input  logic                clk,
  input  logic                s_n,
  // 3-tap FIR filter
  input  logic [X_DIGITS-1:0] fir3_x_p,
  input  logic [X_DIGITS-1:0] fir3_x_m,
  input  logic [COEF_W-1:0]   fir3_coef_a,
  input  logic [COEF_W-1:0]   fir3_coef_b,
  input  logic [COEF_W-1:0]   fir3_coef_c,
  output logic [OUT_W-1:0]    fir3_y,
  // box-car FIR filter
  input  logic [3:0]          bc_x_p,
  input  logic [3:0]          bc_x_m,
  output logic [3:0]          bc_s_p,
  output logic [3:0]          bc_s_m,
  // parallel PPM adder
  input  logic [3:0]          pa_x_p,
  input  logic [3:0]          pa_x_m,
  input  logic [3:0]          pa_y,
  output logic [4:0]          pa_s_p,
  output logic [4:0]          pa_s_m,
  // parallel MMP subtractor
  input  logic [3:0]          ms_x_p,
  input  logic [3:0]          ms_x_m,
  input  logic [3:0]          ms_y,
  output logic [4:0]          ms_s_p,
  output logic [4:0]          ms_s_m,
  // digit-serial PPM adder
  input  logic                ls_x_p,
  input  logic                ls_x_m,
  input  logic                ls_y,
  output logic                ls_s_p,
  output logic                ls_s_m
);
  fir3_transposed u_fir3 (
    .clk(clk), .s_n(s_n), .x_p(fir3_x_p), .x_m(fir3_x_m),
    .coef_a(fir3_coef_a), .coef_b(fir3_coef_b), .coef_c(fir3_coef_c), .y(fir3_y));

  boxcar_fir #(.LANES(4)) u_boxcar (
    .clk(clk), .s_n(s_n), .x_p(bc_x_p), .x_m(bc_x_m), .s_p(bc_s_p), .s_m(bc_s_m));

  ppm_adder_par #(.W(4)) u_ppm_par (
    .x_p(pa_x_p), .x_m(pa_x_m), .y(pa_y), .s_p(pa_s_p), .s_m(pa_s_m));

  mmp_sub_par #(.W(4)) u_mmp_par (
    .x_p(ms_x_p), .x_m(ms_x_m), .y(ms_y), .s_p(ms_s_p), .s_m(ms_s_m));

  ppm_lsd_serial u_ppm_lsd (
    .clk(clk), .s_n(s_n), .x_p(ls_x_p), .x_m(ls_x_m), .y(ls_y), .s_p(ls_s_p), .s_m(ls_s_m));
endmodule
