// spi_latched_write_reg: one read/write SPI register.
//
// Captures data on the rising edge of sclk when latch_en is high and holds
// it otherwise; stored_data drives the chip and the SPI readout. Only the
// external reset clears it, so the value survives the internal reset that
// ends each SPI transaction. The document names this block and its
// data/latch_en/rstn pins; an edge-triggered register on sclk (instead of
// a level latch) is this design's choice, since data changes on the same
// clock that ends latch_en.
module spi_latched_write_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             sclk,
  input  logic             rstn,
  input  logic             latch_en,
  input  logic [WIDTH-1:0] data,
  output logic [WIDTH-1:0] stored_data
);
  timeunit 1ps; timeprecision 1ps;


  always_ff @(posedge sclk or negedge rstn) begin
    if (!rstn)         stored_data <= '0;
    else if (latch_en) stored_data <= data;
  end

endmodule
