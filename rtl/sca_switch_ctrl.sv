// sca_switch_ctrl: sampling-switch control of one switched-capacitor-array
// column: a ring of dual-edge flip-flops, one per storage cell, that walks a
// single "sample" token through the cells.
//
// The column has CELLS cells split into PHASES interleaved sub-chains.
// Sub-chain p is clocked by clk_ph[p] and owns cells p, p+PHASES,
// p+2*PHASES, ... Every clock edge moves each sub-chain's token one stage,
// so with a 5 GHz clock, four phases 25 ps apart and dual-edge cells the
// switch-on window visits the cells in order 0,1,2,... every 25 ps:
// 40 GS/s, 64 cells = 1.6 ns per fast column. The slow bank uses the same
// block with PHASES = 1, 1024 cells and a 2.5 GHz clock (5 GS/s, 204.8 ns).
//
// sw[i] is high while cell i samples. The token enters stage 0 of each
// sub-chain from tok_in (the last stage of the previous column, or of this
// column when it runs alone) and leaves on tok_out. While load is high,
// stage 0 is set to head and all other stages cleared. en and load are
// registered on phase 0 and then on each later phase, so all sub-chains
// start and stop in the same clock cycle (skew must stay below half a
// clock period); while en is low all switches are open and the cells hold
// their samples. A switch window lasts half a clock period (100 ps at
// 5 GHz), so four neighbouring cells track at once; the sample is taken
// when a cell's switch opens, one cell every 25 ps.
//
// Cell counts, clock rates and the 25 ps skew come from the document. The
// token ring, the enable/load scheme and the re-timing are this design's.
module sca_switch_ctrl #(
  parameter int unsigned CELLS  = 64,
  parameter int unsigned PHASES = 4
) (
  input  logic [PHASES-1:0] clk_ph,
  input  logic              rstn,
  input  logic              en,
  input  logic              load,
  input  logic              head,
  input  logic [PHASES-1:0] tok_in,
  output logic [PHASES-1:0] tok_out,
  output logic [CELLS-1:0]  sw
);
  timeunit 1ps; timeprecision 1ps;


  localparam int unsigned LEN = CELLS / PHASES;

  initial begin
    assert (CELLS % PHASES == 0) else $error("CELLS must be a multiple of PHASES");
  end

  // en/load are first registered on phase 0, then each later phase takes
  // them from that register on its own edge, 25 ps (one skew step) later.
  // All sub-chains thus see a change on the same clock cycle.
  logic [PHASES-1:0] en_q, load_q;

  for (genvar p = 0; p < PHASES; p++) begin : g_sub
    logic [LEN-1:0] q;

    always_ff @(posedge clk_ph[p] or negedge rstn) begin
      if (!rstn) begin
        en_q[p]   <= 1'b0;
        load_q[p] <= 1'b0;
      end else if (p == 0) begin
        en_q[p]   <= en;
        load_q[p] <= load;
      end else begin
        en_q[p]   <= en_q[0];
        load_q[p] <= load_q[0];
      end
    end

    for (genvar k = 0; k < LEN; k++) begin : g_stage
      logic d;
      if (k == 0) begin : g_head
        assign d = tok_in[p];
      end else begin : g_body
        assign d = q[k-1];
      end
      detff u_ff (
        .clk(clk_ph[p]), .rstn, .en(en_q[p]), .load(load_q[p]),
        .init(k == 0 ? head : 1'b0), .d, .q(q[k])
      );
      assign sw[k*PHASES + p] = en_q[p] & q[k];
    end

    assign tok_out[p] = q[LEN-1];
  end

endmodule
