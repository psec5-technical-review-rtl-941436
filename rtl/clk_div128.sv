// clk_div128: asynchronous (ripple) divide-by-128 of the 5 GHz clock.
//
// Seven toggle flip-flops in a chain: stage 0 is clocked by the input
// clock, stage i by the output of stage i-1, and each one toggles on the
// rising edge of its clock, so q[i] runs at clk / 2^(i+1). q[0] is the
// 2.5 GHz clock of the slow sampling bank and q[6] the ~39 MHz (5 GHz/128)
// internal clock that also leaves the chip. There is no reset, as in the
// document's schematic: a ripple divider divides correctly from any start
// state, only the phase of the outputs is arbitrary.
module clk_div128 #(
  parameter int unsigned STAGES = 7
) (
  input  logic              clk,
  output logic [STAGES-1:0] q
);
  timeunit 1ps; timeprecision 1ps;


  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic stage_clk;
    logic stage_q;
    if (i == 0) begin : g_first
      assign stage_clk = clk;
    end else begin : g_next
      assign stage_clk = g_stage[i-1].stage_q;
    end
    always_ff @(posedge stage_clk) stage_q <= ~stage_q;
    assign q[i] = stage_q;
  end

endmodule
