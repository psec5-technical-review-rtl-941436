// psec5_top: digital core of PSEC5, an 8-channel waveform sampler that
// stores each input in switched-capacitor arrays (SCA): four fast banks of
// 64 cells at 40 GS/s (6.4 ns in all) and one slow bank of 1024 cells at
// 5 GS/s (204.8 ns) per channel.
//
// Clock tree: the 10 GHz VCO clock (clk10, from the analog oscillator) is
// halved to 5 GHz (clk_div2, gated by clk_en), skewed into four phases 25 ps
// apart (clk_skew_gen, a behavioural delay model) for the fast banks, and
// divided by 128 (clk_div128) into the 2.5 GHz slow-bank clock (q[0]) and
// the ~39 MHz internal clock (q[6]), which clocks the SPI pause detector
// and leaves the chip on clkout.
//
// Control: the SPI block (psec5_spi) holds the trigger channel mask,
// instruction and mode registers. bank_ctrl starts sampling on START,
// groups the fast banks by mode and moves to the next group at each
// trigger. A trigger is any discriminator output enabled by the mask
// (also driven on trig_out) or the external trig_in.
//
// Sampling: per channel, four fast sca_switch_ctrl columns (linked into
// rings by mode) and one slow one produce the switch controls fast_sw and
// slow_sw that go to the analog array (through level shifters that are not
// part of this RTL). The counters behind SPI registers 4..59 are in the
// analog channels; they are addressed by load_cnt_ser/select_reg, brought
// out here. Sizes are the document's; how the blocks are linked beyond
// what the document states is described in each block.
module psec5_top
  import psec5_pkg::*;
#(
  parameter int unsigned CHANNELS   = 8,
  parameter int unsigned FAST_COLS  = 4,
  parameter int unsigned FAST_CELLS = 64,
  parameter int unsigned PHASES     = 4,
  parameter int unsigned SLOW_CELLS = 1024
) (
  input  logic                                           clk10,
  input  logic                                           clk_en,
  input  logic                                           rstn,
  input  logic                                           sclk,
  input  logic                                           pico,
  output logic                                           poci,
  input  logic [CHANNELS-1:0]                            disc,
  input  logic                                           trig_in,
  output logic                                           trig_out,
  output logic                                           clkout,
  output logic [7:0]                                     load_cnt_ser,
  output logic [2:0]                                     select_reg,
  output logic [CHANNELS-1:0][FAST_COLS-1:0][FAST_CELLS-1:0] fast_sw,
  output logic [CHANNELS-1:0][SLOW_CELLS-1:0]            slow_sw
);
  timeunit 1ps; timeprecision 1ps;


  localparam int unsigned SW = (FAST_COLS > 1) ? $clog2(FAST_COLS) : 1;

  // ---------------- clock tree ----------------
  logic              clk5;
  logic [6:0]        divq;
  logic [PHASES-1:0] clk5_ph;
  logic              iclk, clk2g5;

  clk_div2 u_div2 (.clk(clk10), .rstb(rstn), .enable(clk_en), .q(clk5), .qb());
  clk_div128 u_div128 (.clk(clk5), .q(divq));
  clk_skew_gen #(.PHASES(PHASES)) u_skew (.clk(clk5), .clk_ph(clk5_ph));

  assign clk2g5 = divq[0];
  assign iclk   = divq[6];
  assign clkout = iclk;

  // ---------------- SPI registers ----------------
  logic [7:0] trig_mask, instruction, mode;

  psec5_spi u_spi (
    .iclk, .rstn, .sclk, .serial_in(pico), .serial_out(poci),
    .trigger_channel_mask(trig_mask), .instruction, .mode,
    .load_cnt_ser, .select_reg
  );

  // ---------------- trigger and bank control ----------------
  logic [7:0] disc_ext;
  assign disc_ext = 8'(disc);
  assign trig_out = |(disc_ext & trig_mask);

  logic                          load, slow_en, done;
  logic [FAST_COLS-1:0]          head, fast_en;
  logic [FAST_COLS-1:0][SW-1:0]  tok_src;
  logic [SW-1:0]                 group;
  logic [2:0]                    edges;

  bank_ctrl #(.FAST_COLS(FAST_COLS)) u_ctrl (
    .clk(clk5), .rstn, .instruction, .mode, .trig(trig_out | trig_in),
    .load, .head, .tok_src, .fast_en, .slow_en, .group, .done, .edges
  );

  // ---------------- sampling-switch chains ----------------
  for (genvar ch = 0; ch < CHANNELS; ch++) begin : g_ch
    logic [FAST_COLS-1:0][PHASES-1:0] tok;

    for (genvar k = 0; k < FAST_COLS; k++) begin : g_col
      sca_switch_ctrl #(.CELLS(FAST_CELLS), .PHASES(PHASES)) u_fast (
        .clk_ph(clk5_ph), .rstn, .en(fast_en[k]), .load, .head(head[k]),
        .tok_in(tok[tok_src[k]]), .tok_out(tok[k]),
        .sw(fast_sw[ch][k])
      );
    end

    logic slow_tok;
    sca_switch_ctrl #(.CELLS(SLOW_CELLS), .PHASES(1)) u_slow (
      .clk_ph(clk2g5), .rstn, .en(slow_en), .load, .head(1'b1),
      .tok_in(slow_tok), .tok_out(slow_tok),
      .sw(slow_sw[ch])
    );
  end

endmodule
