// tb_spi_convert_addr: every address, with and without the write flag and
// reset, against the register map: counter k occupies registers
// 4+7k .. 10+7k, byte j of it is register 4+7k+j.
module tb_spi_convert_addr;
  timeunit 1ps; timeprecision 1ps;
  logic [7:0] mux_control_signal, load_cnt_ser, exp_l;
  logic rstn;
  logic [2:0] select_reg, exp_s;
  int checks = 0, failures = 0;

  spi_convert_addr dut (.*);

  initial begin
    for (int r = 0; r < 2; r++)
      for (int a = 0; a < 256; a++) begin
        mux_control_signal = 8'(a); rstn = 1'(r);
        #1;
        exp_l = 8'h00; exp_s = 3'b111;
        for (int k = 0; k < 8; k++)
          for (int j = 0; j < 7; j++)
            if (r == 1 && (a % 128) == 4 + 7 * k + j) begin
              exp_l = 8'(1 << k); exp_s = 3'(j);
            end
        checks++;
        if (load_cnt_ser !== exp_l || select_reg !== exp_s) begin
          failures++;
          $display("FAIL a=%0d got %h/%0d exp %h/%0d", a, load_cnt_ser, select_reg, exp_l, exp_s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
