// Word register built from W D flip-flops (the 9-DFF of the 3-tap filter).
//
// All bits share the clock and the S pin (S low clears the word). One clock
// of latency from d to q.
module dff_reg #(
  parameter int unsigned W = 9
) (
  input  logic         clk,
  input  logic         s_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    dff_s u_ff (.clk(clk), .s_n(s_n), .d(d[i]), .q(q[i]));
  end
endmodule
