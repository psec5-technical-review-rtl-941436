// detff: dual-edge-triggered flip-flop, the cell that drives one sampling
// switch of the switched-capacitor array.
//
// Built as the XOR form of a DETFF: one flip-flop captures on the rising
// clock edge, one on the falling edge, and q = q_rise ^ q_fall. At a rising
// edge the rising half stores d ^ q_fall, so q becomes d; at a falling edge
// the falling half stores d ^ q_rise, again giving q = d. Each edge
// therefore captures d, and a 5 GHz clock moves data at 10 GS/s. Because q
// depends only on the two flip-flops and not on the clock level, it changes
// once per edge with no clock-to-output glitch, and cells can be chained
// directly (d of one cell = q of the previous one).
//
// en low holds q; load forces the captured value to init; rstn clears q
// asynchronously.
//
// That the cell is dual-edge and clocked at 5 GHz (fast banks) or 2.5 GHz
// (slow bank) is from the document. Its circuit there is a transistor-level
// flip-flop; the XOR structure and the en/load pins are this design's.
module detff (
  input  logic clk,
  input  logic rstn,
  input  logic en,
  input  logic load,
  input  logic init,
  input  logic d,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;

  logic q_rise, q_fall, d_eff;

  assign d_eff = load ? init : d;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn)             q_rise <= 1'b0;
    else if (en || load)   q_rise <= d_eff ^ q_fall;
  end

  always_ff @(negedge clk or negedge rstn) begin
    if (!rstn)             q_fall <= 1'b0;
    else if (en || load)   q_fall <= d_eff ^ q_rise;
  end

  assign q = q_rise ^ q_fall;

endmodule
