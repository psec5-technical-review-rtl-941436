// tb_spi_latched_write_reg: random data and enables against a reference
// register; checks the asynchronous reset.
module tb_spi_latched_write_reg;
  timeunit 1ps; timeprecision 1ps;
  logic sclk = 1'b0, rstn = 1'b1, latch_en = 1'b0;
  logic [7:0] data = '0, stored_data, model;
  int checks = 0, failures = 0;

  spi_latched_write_reg dut (.*);

  initial begin
    #1ns rstn = 1'b0; #1ns;
    checks++; if (stored_data !== 8'h00) failures++;
    rstn = 1'b1; model = '0;
    repeat (200) begin
      data = 8'($urandom); latch_en = 1'($urandom);
      #5ns sclk = 1'b1;
      if (latch_en) model = data;
      #5ns sclk = 1'b0;
      checks++;
      if (stored_data !== model) begin
        failures++; $display("FAIL got %h exp %h", stored_data, model);
      end
    end
    rstn = 1'b0; #1ns;
    checks++; if (stored_data !== 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
