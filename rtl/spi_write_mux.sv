// spi_write_mux: turns the current SPI address into write strobes for the
// three read/write registers (trigger channel mask, instruction, mode).
//
// A strobe is high while the last bit of a data byte is on the line
// (byte_last with msg_flag), the address byte carried the write flag
// (bit 7) and its register address is 1, 2 or 3. The registers capture the
// byte at the sclk edge that ends that cycle. Writes to any other address
// are dropped, so the counters (registers 4..59) and register 0 stay
// read-only as the register map requires. The write flag is this design's
// choice; the document shows the block but not how it tells a read from a
// write. Purely combinational; rstn forces all strobes low.
//
// latch_signal[0]: trigger channel mask (reg 1)
// latch_signal[1]: instruction (reg 2)
// latch_signal[2]: mode (reg 3)
module spi_write_mux
  import psec5_pkg::*;
(
  input  logic [7:0] addr,
  input  logic       rstn,
  input  logic       msg_flag,
  input  logic       byte_last,
  output logic [2:0] latch_signal
);
  timeunit 1ps; timeprecision 1ps;


  logic write_now;
  assign write_now = rstn && msg_flag && byte_last && addr[ADDR_WRITE_BIT];

  always_comb begin
    latch_signal = '0;
    if (write_now) begin
      case (addr[6:0])
        REG_TRIG_MASK: latch_signal[0] = 1'b1;
        REG_INSTR:     latch_signal[1] = 1'b1;
        REG_MODE:      latch_signal[2] = 1'b1;
        default:       latch_signal = '0;
      endcase
    end
  end

endmodule
