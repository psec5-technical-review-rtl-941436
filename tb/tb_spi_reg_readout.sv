// tb_spi_reg_readout: loads on byte_start at a falling sclk edge and
// checks that the addressed register comes out MSB first over the next
// eight bit periods; unreadable addresses return zeros.
module tb_spi_reg_readout;
  timeunit 1ps; timeprecision 1ps;
  logic sclk = 1'b0, rstn = 1'b1, msg_flag = 1'b0, byte_start = 1'b0;
  logic [7:0] mux_control_signal = '0;
  logic [7:0] trigger_channel_mask = 8'h96, instruction = 8'h02, mode = 8'h01;
  logic serial_out;
  int checks = 0, failures = 0;

  spi_reg_readout dut (.*);

  task automatic read_byte(input logic [7:0] a, input logic [7:0] exp);
    logic [7:0] got;
    mux_control_signal = a; msg_flag = 1'b1;
    for (int b = 7; b >= 0; b--) begin
      byte_start = (b == 7);
      #5ns sclk = 1'b0;       // falling edge: load or shift
      #5ns got[b] = serial_out;
      sclk = 1'b1;
    end
    checks++;
    if (got !== exp) begin failures++; $display("FAIL addr %h got %h exp %h", a, got, exp); end
  endtask

  initial begin
    sclk = 1'b1;
    #1ns rstn = 1'b0; #1ns rstn = 1'b1;
    for (int r = 0; r < 3; r++) begin
      read_byte(8'h01, trigger_channel_mask);
      read_byte(8'h02, instruction);
      read_byte(8'h83, mode);
      read_byte(8'h00, 8'h00);
      read_byte(8'h04, 8'h00);
      read_byte(8'h3B, 8'h00);
      trigger_channel_mask = 8'($urandom); instruction = 8'($urandom); mode = 8'($urandom);
    end
    msg_flag = 1'b0; #1ns;
    checks++; if (serial_out !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
