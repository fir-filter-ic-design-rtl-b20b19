// D flip-flop with the S control pin.
//
// With S high the flip-flop follows D on each rising clock edge; with S low
// its output is held at 0. This is the behaviour given for the filter's
// delay cell. That S clears immediately (asynchronously) rather than at the
// next edge, and the rising edge, are this design's choices: the gate-level
// circuit of the cell is not reproduced.
// In the original adder and filter schematics S is tied high; here it is
// brought out so that the state can be cleared. Holding s_n at 1 gives the
// original behaviour.
module dff_s (
  input  logic clk,
  input  logic s_n,   // S: 1 = Q follows D, 0 = Q forced to 0
  input  logic d,
  output logic q
);
  always_ff @(posedge clk or negedge s_n) begin
    if (!s_n) q <= 1'b0;
    else      q <= d;
  end
endmodule
