// clk_div2: first divider of the clock tree, 10 GHz VCO clock -> 5 GHz.
//
// A toggle flip-flop halves the input clock. A reset flip-flop samples the
// enable pin on every rising input edge; while that sampled enable is low,
// the divider stops with its output low, which is how the divider is
// switched off together with its power-gated supply. rstb clears both
// flip-flops asynchronously.
//
// The divide-by-2, the enable-sampling reset flip-flop and the pin names
// (clk, rstb, Q, Qb) follow the document. Holding the output low while
// disabled is this design's reading of the power gate.
module clk_div2 (
  input  logic clk,
  input  logic rstb,
  input  logic enable,
  output logic q,
  output logic qb
);
  timeunit 1ps; timeprecision 1ps;


  logic en_q;

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb) en_q <= 1'b0;
    else       en_q <= enable;
  end

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb)      q <= 1'b0;
    else if (en_q)  q <= ~q;
    else            q <= 1'b0;
  end

  assign qb = ~q;

endmodule
