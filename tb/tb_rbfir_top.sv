// End-to-end testbench of the top level, at its default sizes.
//
// All units run at once from one clock. Time is cut into frames of 12
// clocks: the box-car lanes and the digit-serial PPM adder each receive an
// 8-digit word (least significant digit first) and 4 flush digits per frame,
// while the 3-tap filter takes a new random sample every clock and the
// parallel PPM/MMP units a new random operand set every clock. Every output
// is compared with an independent model:
//   * 3-tap filter: y(n) = a x(n) + b x(n-1) + c x(n-2), wrapped to 10 bits,
//     with each past sample paired with the coefficients of its time;
//   * box-car lanes: output word = 15 x input word;
//   * serial PPM adder: output word = X + Y;
//   * parallel PPM / MMP: S+ - S- = X+ - X- +/- Y.
// It also counts how often each mechanism occurred and fails if one never
// did: a -1 digit recoded in a multiplier sample, a negative filter output
// (borrow out of the final converter), a mid-stream S clear with state
// pending, a nonzero box-car digit during flush (delayed transfers), a
// transfer out of the top digit of the parallel adder and subtractor.
module tb_rbfir_top;
  localparam int N      = 8;
  localparam int FLUSH  = 4;
  localparam int FRAMES = 400;

  logic clk = 1'b0, s_n;
  logic [3:0] fx_p, fx_m, ca, cb, cc;
  logic [9:0] fy;
  logic [3:0] bx_p, bx_m, bs_p, bs_m;
  logic [3:0] pax_p, pax_m, pay, msx_p, msx_m, msy;
  logic [4:0] pas_p, pas_m, mss_p, mss_m;
  logic lx_p, lx_m, ly, ls_p, ls_m;

  int checks = 0, failures = 0;
  int n_negdigit = 0, n_negout = 0, n_clear = 0, n_bcflush = 0, n_pacarry = 0, n_mscarry = 0;

  rbfir_top dut (
    .clk(clk), .s_n(s_n),
    .fir3_x_p(fx_p), .fir3_x_m(fx_m), .fir3_coef_a(ca), .fir3_coef_b(cb), .fir3_coef_c(cc), .fir3_y(fy),
    .bc_x_p(bx_p), .bc_x_m(bx_m), .bc_s_p(bs_p), .bc_s_m(bs_m),
    .pa_x_p(pax_p), .pa_x_m(pax_m), .pa_y(pay), .pa_s_p(pas_p), .pa_s_m(pas_m),
    .ms_x_p(msx_p), .ms_x_m(msx_m), .ms_y(msy), .ms_s_p(mss_p), .ms_s_m(mss_m),
    .ls_x_p(lx_p), .ls_x_m(lx_m), .ls_y(ly), .ls_s_p(ls_p), .ls_s_m(ls_m));

  always #5 clk = ~clk;

  // 3-tap filter model state
  int x0, x1, x2, b1, c1, c2;

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", what, $time);
  endtask

  initial begin
    longint bxv [4];
    longint bsv [4];
    longint lxv, lyv, lsv;
    logic   pending_clear;

    s_n = 1'b0;
    {fx_p, fx_m, ca, cb, cc, bx_p, bx_m, pax_p, pax_m, pay, msx_p, msx_m, msy} = '0;
    {lx_p, lx_m, ly} = '0;
    x0 = 0; x1 = 0; x2 = 0; b1 = 0; c1 = 0; c2 = 0;
    repeat (2) @(negedge clk);
    s_n = 1'b1;

    for (int f = 0; f < FRAMES; f++) begin
      for (int l = 0; l < 4; l++) begin bxv[l] = 0; bsv[l] = 0; end
      lxv = 0; lyv = 0; lsv = 0;
      if (f % 20 == 0) {ca, cb, cc} = 12'($urandom);
      if (f == 7) {ca, cb, cc} = {4'd8, 4'd8, 4'd8};   // the coefficient 0.125 on every tap

      for (int k = 0; k < N + FLUSH; k++) begin
        int fexp;
        // ---- drive ----
        fx_p = 4'($urandom); fx_m = 4'($urandom);
        if (k < N) begin
          bx_p = 4'($urandom); bx_m = 4'($urandom);
          {lx_p, lx_m, ly} = 3'($urandom);
        end else begin
          bx_p = '0; bx_m = '0; {lx_p, lx_m, ly} = '0;
        end
        pax_p = 4'($urandom); pax_m = 4'($urandom); pay = 4'($urandom);
        msx_p = 4'($urandom); msx_m = 4'($urandom); msy = 4'($urandom);
        x0 = int'(fx_p) - int'(fx_m);
        #1;

        // ---- check the 3-tap filter ----
        fexp = int'(ca) * x0 + b1 * x1 + c2 * x2;
        checks++;
        if (fy != 10'(fexp)) fail($sformatf("fir3 y=%0d exp=%0d", $signed(fy), fexp));
        if ((~fx_p & fx_m) != 4'b0) n_negdigit++;
        if (fy[9]) n_negout++;

        // ---- check the parallel units ----
        checks++;
        if (int'(pas_p) - int'(pas_m) != int'(pax_p) - int'(pax_m) + int'(pay)) fail("ppm_adder_par");
        if (pas_p[4]) n_pacarry++;
        checks++;
        if (int'(mss_p) - int'(mss_m) != int'(msx_p) - int'(msx_m) - int'(msy)) fail("mmp_sub_par");
        if (mss_m[4]) n_mscarry++;

        // ---- accumulate the serial words ----
        for (int l = 0; l < 4; l++) begin
          bxv[l] += (longint'(bx_p[l]) - longint'(bx_m[l])) <<< k;
          bsv[l] += (longint'(bs_p[l]) - longint'(bs_m[l])) <<< k;
        end
        if (k >= N && (bs_p != 0 || bs_m != 0)) n_bcflush++;
        lxv += (longint'(lx_p) - longint'(lx_m)) <<< k;
        lyv += longint'(ly) <<< k;
        lsv += (longint'(ls_p) - longint'(ls_m)) <<< k;

        // ---- S clear in the middle of a filter stream, state pending ----
        pending_clear = (f % 50 == 25) && (k == N + FLUSH - 1);
        @(negedge clk);
        x2 = x1; x1 = x0; c2 = c1; c1 = int'(cc); b1 = int'(cb);
        if (pending_clear) begin
          if (x1 != 0 || x2 != 0) n_clear++;
          s_n = 1'b0; #1;
          // with every register cleared only the a*x(n) term is left
          checks++;
          if (fy != 10'(int'(ca) * x0)) fail("clear of the 3-tap filter");
          checks++;
          if (bs_p != 0 || bs_m != 0 || ls_p || ls_m) fail("clear of the serial units");
          s_n = 1'b1;
          x1 = 0; x2 = 0; b1 = 0; c1 = 0; c2 = 0;
        end
      end

      for (int l = 0; l < 4; l++) begin
        checks++;
        if (bsv[l] != 15 * bxv[l]) fail($sformatf("boxcar lane %0d S=%0d exp=%0d", l, bsv[l], 15 * bxv[l]));
      end
      checks++;
      if (lsv != lxv + lyv) fail("ppm_lsd_serial");
    end

    $display("mechanisms: negative digit %0d, negative output %0d, clear %0d, box-car flush digit %0d, PPM top transfer %0d, MMP top transfer %0d",
             n_negdigit, n_negout, n_clear, n_bcflush, n_pacarry, n_mscarry);
    if (n_negdigit == 0) fail("no negative digit");
    if (n_negout   == 0) fail("no negative output");
    if (n_clear    == 0) fail("no clear with pending state");
    if (n_bcflush  == 0) fail("no box-car flush digit");
    if (n_pacarry  == 0) fail("no PPM top transfer");
    if (n_mscarry  == 0) fail("no MMP top transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
