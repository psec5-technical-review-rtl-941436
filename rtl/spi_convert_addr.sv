// spi_convert_addr: maps the SPI register address onto the counter
// selection lines of the analog channels.
//
// Registers 4..59 are eight counters of seven bytes, one counter per
// analog channel. For such an address a, the channel is (a-4)/7 and is
// selected by a one-hot bit in load_cnt_ser; the byte within the counter
// is (a-4)%7 on select_reg. Any other address (0..3, 60 and above) and
// reset give load_cnt_ser = 0 and select_reg = 3'b111, which reads out
// nothing. The mapping, the one-hot channel code and the "no data" code
// follow the document. The write flag (bit 7) is ignored here.
// Purely combinational.
module spi_convert_addr
  import psec5_pkg::*;
(
  input  logic [7:0] mux_control_signal,
  input  logic       rstn,
  output logic [7:0] load_cnt_ser,
  output logic [2:0] select_reg
);
  timeunit 1ps; timeprecision 1ps;


  logic [6:0] a;
  assign a = mux_control_signal[6:0];

  always_comb begin
    load_cnt_ser = '0;
    select_reg   = SELECT_NONE;
    if (rstn) begin
      for (int unsigned c = 0; c < NUM_CHANNELS; c++) begin
        if (a >= 7'(FIRST_COUNTER_REG + c * REGS_PER_COUNTER) &&
            a <  7'(FIRST_COUNTER_REG + (c + 1) * REGS_PER_COUNTER)) begin
          load_cnt_ser[c] = 1'b1;
          select_reg = 3'(a - 7'(FIRST_COUNTER_REG + c * REGS_PER_COUNTER));
        end
      end
    end
  end

endmodule
