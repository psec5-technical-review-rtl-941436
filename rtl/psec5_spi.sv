// psec5_spi: SPI slave register block of the chip.
//
// The FPGA sends a string of bytes on PICO (serial_in) with sclk: the first
// byte is the address, every further byte goes to the next register. Bit 7
// of the address byte asks for a write; without it the data bytes are
// ignored and the block only reads. During each data byte the old content
// of the addressed register is shifted out on POCI (serial_out), so a write
// also returns the previous value. The address advances every 8 sclk
// cycles. A pause of 7 internal-clock (iclk) cycles without sclk ends the
// transaction: the internal reset (rstn AND sclk_stop_rstn) clears the
// addressing logic but keeps the three registers.
//
// Registers (8 bits each): 1 trigger channel mask, 2 instruction
// (1 reset, 2 readout, 3 start), 3 mode (0/1/2 = 1/2/4 fast banks per
// edge). Addresses 4..59 select counter bytes in the analog channels
// through load_cnt_ser (one-hot channel) and select_reg (byte 0..6).
//
// The structure (PICO, write mux, three registers, address conversion,
// readout, the AND of the two resets) follows the block diagram in the
// document; the write flag, bit order and clock edges are this design's.
module psec5_spi
  import psec5_pkg::*;
#(
  parameter int unsigned IDLE_ICLK = 7
) (
  input  logic       iclk,
  input  logic       rstn,
  input  logic       sclk,
  input  logic       serial_in,
  output logic       serial_out,
  output logic [7:0] trigger_channel_mask,
  output logic [7:0] instruction,
  output logic [7:0] mode,
  output logic [7:0] load_cnt_ser,
  output logic [2:0] select_reg
);
  timeunit 1ps; timeprecision 1ps;


  logic       msg_flag, sclk_stop_rstn, byte_last, byte_start;
  logic [7:0] addr, write_data;
  logic [2:0] latch_signal;
  logic       rstn0;

  spi_pico #(.IDLE_ICLK(IDLE_ICLK)) u_pico (
    .iclk, .rstn, .sclk, .serial_in,
    .msg_flag, .mux_control_signal(addr), .sclk_stop_rstn,
    .write_data, .byte_last, .byte_start
  );

  assign rstn0 = rstn & sclk_stop_rstn;

  spi_write_mux u_write_mux (
    .addr, .rstn(rstn0), .msg_flag, .byte_last, .latch_signal
  );

  spi_latched_write_reg u_trig_mask_reg (
    .sclk, .rstn, .latch_en(latch_signal[0]), .data(write_data),
    .stored_data(trigger_channel_mask)
  );
  spi_latched_write_reg u_instruction_reg (
    .sclk, .rstn, .latch_en(latch_signal[1]), .data(write_data),
    .stored_data(instruction)
  );
  spi_latched_write_reg u_mode_reg (
    .sclk, .rstn, .latch_en(latch_signal[2]), .data(write_data),
    .stored_data(mode)
  );

  spi_convert_addr u_addr_out (
    .mux_control_signal(addr), .rstn(rstn0), .load_cnt_ser, .select_reg
  );

  spi_reg_readout u_data_out (
    .sclk, .rstn(rstn0), .msg_flag, .byte_start,
    .mux_control_signal(addr), .trigger_channel_mask, .instruction, .mode,
    .serial_out
  );

endmodule
