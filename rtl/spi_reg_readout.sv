// spi_reg_readout: serial readout of the read/write SPI registers.
//
// At the falling sclk edge that opens a data byte (byte_start), the
// register selected by the current address is loaded into an 8-bit output
// shift register; the next seven falling edges shift it, MSB first, onto
// serial_out. The host therefore sees register N during the byte that
// follows address N, register N+1 during the next one, and so on, as in
// the SPI timing figure. Registers 1..3 return their contents; register 0
// and the counter registers 4..59 return zeros from this block (counter
// data is produced in the analog channels selected by load_cnt_ser and
// select_reg). Outside a transaction serial_out is low.
//
// Port names follow the document. Changing the output on the falling edge
// so that the host can sample on the rising edge is this design's choice.
module spi_reg_readout
  import psec5_pkg::*;
(
  input  logic       sclk,
  input  logic       rstn,                 // external & internal reset
  input  logic       msg_flag,
  input  logic       byte_start,
  input  logic [7:0] mux_control_signal,
  input  logic [7:0] trigger_channel_mask,
  input  logic [7:0] instruction,
  input  logic [7:0] mode,
  output logic       serial_out
);
  timeunit 1ps; timeprecision 1ps;


  logic [7:0] sel_data;
  logic [7:0] out_q;

  always_comb begin
    case (mux_control_signal[6:0])
      REG_TRIG_MASK: sel_data = trigger_channel_mask;
      REG_INSTR:     sel_data = instruction;
      REG_MODE:      sel_data = mode;
      default:       sel_data = '0;
    endcase
  end

  always_ff @(negedge sclk or negedge rstn) begin
    if (!rstn)           out_q <= '0;
    else if (byte_start) out_q <= sel_data;
    else                 out_q <= {out_q[6:0], 1'b0};
  end

  assign serial_out = msg_flag & out_q[7];

endmodule
