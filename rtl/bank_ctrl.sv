// bank_ctrl: start/stop control of the sampling banks.
//
// The four fast banks (1.6 ns each) are grouped by the mode register: mode
// 0 makes four groups of one bank, mode 1 two groups of two, mode 2 one
// group of four. The banks of a group are linked into one ring, so a group
// records the last 1.6, 3.2 or 6.4 ns before it is stopped. Each trigger
// edge stops the running group, whose cells then hold that edge, and hands
// sampling to the next group, so the chip captures 4, 2 or 1 edges per
// event. After the last group has been stopped the slow bank stops too and
// the controller waits in DONE for readout.
//
// Instruction register: RESET (1) returns to IDLE, where the token rings
// are kept loaded; START (3) seen in IDLE starts sampling; in DONE the
// controller waits for RESET. Instruction and trigger arrive from other
// clock domains and pass two-flop synchronisers; the mode is taken in IDLE.
//
// Outputs (all registered on clk, the 5 GHz clock):
//   load       token rings are loaded (IDLE)
//   head[c]    bank c starts its group's ring (used while load is high)
//   tok_src[c] bank whose last cell feeds bank c's first cell: c-1 inside
//              a group, the group's last bank for its first bank (a ring)
//   fast_en[c] bank c is sampling
//   slow_en    slow bank is sampling
//   group      index of the running group; done: all groups stopped
//   edges      number of trigger edges captured since start
//
// The register codes and the 1/2/4-bank grouping are from the document;
// the order of groups, the stop-on-trigger hand-over and the restart rule
// are this design's reading of it.
module bank_ctrl
  import psec5_pkg::*;
#(
  parameter int unsigned FAST_COLS = 4,
  localparam int unsigned SW = (FAST_COLS > 1) ? $clog2(FAST_COLS) : 1
) (
  input  logic                 clk,
  input  logic                 rstn,
  input  logic [7:0]           instruction,
  input  logic [7:0]           mode,
  input  logic                 trig,
  output logic                 load,
  output logic [FAST_COLS-1:0] head,
  output logic [FAST_COLS-1:0][SW-1:0] tok_src,
  output logic [FAST_COLS-1:0] fast_en,
  output logic                 slow_en,
  output logic [SW-1:0]        group,
  output logic                 done,
  output logic [2:0]           edges
);
  timeunit 1ps; timeprecision 1ps;


  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state_q;

  logic [1:0] start_sync_q, reset_sync_q, trig_sync_q;
  logic       trig_prev_q;
  logic       start_s, reset_s, trig_edge;
  logic [7:0] mode_q;
  logic [SW-1:0] group_q;
  logic [2:0] edges_q;
  int unsigned gsize, ngroups;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      start_sync_q <= '0;
      reset_sync_q <= '0;
      trig_sync_q  <= '0;
      trig_prev_q  <= 1'b0;
    end else begin
      start_sync_q <= {start_sync_q[0], instruction == INSTR_START};
      reset_sync_q <= {reset_sync_q[0], instruction == INSTR_RESET};
      trig_sync_q  <= {trig_sync_q[0], trig};
      trig_prev_q  <= trig_sync_q[1];
    end
  end

  assign start_s   = start_sync_q[1];
  assign reset_s   = reset_sync_q[1];
  assign trig_edge = trig_sync_q[1] & ~trig_prev_q;

  assign gsize   = banks_per_group(mode_q);
  assign ngroups = FAST_COLS / gsize;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      state_q <= S_IDLE;
      mode_q  <= '0;
      group_q <= '0;
      edges_q <= '0;
    end else if (reset_s) begin
      state_q <= S_IDLE;
      mode_q  <= mode;
      group_q <= '0;
      edges_q <= '0;
    end else begin
      case (state_q)
        S_IDLE: begin
          mode_q  <= mode;
          group_q <= '0;
          if (start_s) begin
            state_q <= S_RUN;
            edges_q <= '0;
          end
        end
        S_RUN: begin
          if (trig_edge) begin
            edges_q <= edges_q + 3'd1;
            if (32'(group_q) == ngroups - 1) state_q <= S_DONE;
            else                             group_q <= group_q + 1'b1;
          end
        end
        default: ;   // S_DONE: hold until RESET
      endcase
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < FAST_COLS; c++) begin
      head[c]    = (c % gsize) == 0;
      tok_src[c] = ((c % gsize) != 0) ? SW'(c - 1) : SW'(c + gsize - 1);
      fast_en[c] = (state_q == S_RUN) && (c / gsize == 32'(group_q));
    end
  end

  assign load    = (state_q == S_IDLE);
  assign slow_en = (state_q == S_RUN);
  assign done    = (state_q == S_DONE);
  assign group   = group_q;
  assign edges   = edges_q;

  // A stopped group never restarts before the next load.
  property p_done_quiet;
    @(posedge clk) disable iff (!rstn) done |-> (fast_en == '0 && !slow_en);
  endproperty
  assert property (p_done_quiet);

endmodule
