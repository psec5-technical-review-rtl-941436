// clk_skew_gen: behavioural model of the 5 GHz clock skew generator.
//
// The real block is a set of clock buffers sized so that consecutive
// copies of the 5 GHz clock are 25 ps apart (typical corner); it has no
// logic function and is modelled here by pure transport delays: clk_ph[i]
// is clk delayed by i*SKEW_PS picoseconds. The four phases interleave the
// four dual-edge sub-chains of a fast column into 40 GS/s. This model is
// for simulation only and is not synthesizable. The 25 ps figure is the
// document's; four phases follow from 40 GS/s over a 10 GS/s dual-edge
// chain.
module clk_skew_gen #(
  parameter int unsigned PHASES  = 4,
  parameter int unsigned SKEW_PS = 25
) (
  input  logic              clk,
  output logic [PHASES-1:0] clk_ph
);
  timeunit 1ps; timeprecision 1ps;

  for (genvar i = 0; i < PHASES; i++) begin : g_ph
    if (i == 0) begin : g_zero
      assign clk_ph[i] = clk;
    end else begin : g_delay
      assign #(i * SKEW_PS) clk_ph[i] = clk;
    end
  end

endmodule
