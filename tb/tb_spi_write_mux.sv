// tb_spi_write_mux: exhaustive check of the write strobes against the
// register map: only registers 1..3, only with the write flag, only in the
// last bit of a data byte, never in reset.
module tb_spi_write_mux;
  timeunit 1ps; timeprecision 1ps;
  logic [7:0] addr;
  logic rstn, msg_flag, byte_last;
  logic [2:0] latch_signal, exp;
  int checks = 0, failures = 0;

  spi_write_mux dut (.*);

  initial begin
    for (int a = 0; a < 256; a++)
      for (int c = 0; c < 8; c++) begin
        addr = 8'(a); {rstn, msg_flag, byte_last} = 3'(c);
        #1;
        exp = '0;
        if (c == 7 && a >= 128 && (a - 128) >= 1 && (a - 128) <= 3) exp = 3'(1 << (a - 128 - 1));
        checks++;
        if (latch_signal !== exp) begin
          failures++;
          $display("FAIL addr=%0h ctl=%0d got %b exp %b", a, c, latch_signal, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
