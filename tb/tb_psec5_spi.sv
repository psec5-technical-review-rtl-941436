// tb_psec5_spi: self-checking test of the SPI register block.
//
// Drives SPI transactions MSB first at 40 MHz (25 ns sclk) with a 39 MHz
// internal clock and checks: writes to registers 1..3 with the write flag,
// the old value returned on serial_out during each data byte, reads
// without the write flag leave the registers alone, writes to read-only
// addresses are dropped, load_cnt_ser/select_reg for every counter register
// 4..59 (expected values from the register map arithmetic), the "no data"
// code for invalid addresses, the internal reset after 7 quiet iclk cycles
// (the host waits 7 + 4 synchroniser cycles) and that a shorter pause
// does not end a transaction.
module tb_psec5_spi;
  timeunit 1ps; timeprecision 1ps;

  logic iclk = 1'b0, rstn = 1'b1, sclk = 1'b0, serial_in = 1'b0;
  logic serial_out;
  logic [7:0] trigger_channel_mask, instruction, mode, load_cnt_ser;
  logic [2:0] select_reg;

  int checks = 0, failures = 0;

  psec5_spi dut (.*);

  always #12800 iclk = ~iclk;   // 25.6 ns: 5 GHz / 128

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // One byte on the bus; returns what the chip shifted out during it.
  // Optionally checks the counter select lines in the middle of the byte.
  task automatic spi_byte(input logic [7:0] tx, output logic [7:0] rx);
    for (int b = 7; b >= 0; b--) begin
      serial_in = tx[b];
      #12500;
      rx[b] = serial_out;
      sclk = 1'b1;
      #12500;
      sclk = 1'b0;
    end
  endtask

  task automatic idle(input int iclk_cycles);
    repeat (iclk_cycles) @(posedge iclk);
  endtask

  function automatic logic [10:0] expected_sel(input int a);
    // {load_cnt_ser, select_reg}
    if (a >= 4 && a <= 59) return {8'(1 << ((a - 4) / 7)), 3'((a - 4) % 7)};
    return {8'h00, 3'b111};
  endfunction

  logic [7:0] rx;
  int quick_pause_ok = 0;

  initial begin
    #1ns rstn = 1'b0;
    #30ns rstn = 1'b1;
    idle(2);

    // Write mask, instruction, mode in one string of bytes.
    spi_byte(8'h81, rx);
    spi_byte(8'hA5, rx); check("old mask", rx, 8'h00);
    spi_byte(8'h03, rx); check("old instr", rx, 8'h00);
    spi_byte(8'h02, rx); check("old mode", rx, 8'h00);
    check("mask", trigger_channel_mask, 8'hA5);
    check("instr", instruction, 8'h03);
    check("mode", mode, 8'h02);
    idle(12);
    check("msg_flag cleared by internal reset", dut.msg_flag, 1'b0);

    // Read back without the write flag; data bytes must be ignored.
    spi_byte(8'h01, rx);
    spi_byte(8'hFF, rx); check("read mask", rx, 8'hA5);
    spi_byte(8'hFF, rx); check("read instr", rx, 8'h03);
    spi_byte(8'hFF, rx); check("read mode", rx, 8'h02);
    check("mask kept", trigger_channel_mask, 8'hA5);
    idle(12);

    // Short pause (3 iclk) inside a transaction does not reset the address.
    spi_byte(8'h82, rx);
    spi_byte(8'h01, rx); check("old instr 2", rx, 8'h03);
    idle(3);
    spi_byte(8'h00, rx); check("after short pause: old mode", rx, 8'h02);
    check("instr written", instruction, 8'h01);
    check("mode written after pause", mode, 8'h00);
    if (mode == 8'h00) quick_pause_ok++;
    idle(12);

    // Write attempt to read-only register 4 and reserved register 0.
    spi_byte(8'h84, rx);
    spi_byte(8'h5A, rx); check("counter reg reads 0 here", rx, 8'h00);
    idle(12);
    spi_byte(8'h80, rx);
    spi_byte(8'h5A, rx); check("reg 0 reads nothing", rx, 8'h00);
    spi_byte(8'h77, rx); check("reg 1 old value", rx, 8'hA5);
    check("reg 1 overwritten via increment", trigger_channel_mask, 8'h77);
    check("instr untouched", instruction, 8'h01);
    idle(12);

    // Sweep all counter registers 4..59 and two invalid addresses.
    begin
      int a;
      logic [7:0] ignore;
      // address byte
      for (int b = 7; b >= 0; b--) begin
        serial_in = b == 2 ? 1'b1 : 1'b0;   // 0x04
        #12500 sclk = 1'b1; #12500 sclk = 1'b0;
      end
      for (a = 4; a <= 61; a++) begin
        #6000;
        check($sformatf("sel at reg %0d", a), {load_cnt_ser, select_reg}, expected_sel(a));
        spi_byte(8'h00, ignore);
      end
    end
    idle(12);
    check("no channel after transaction", {load_cnt_ser, select_reg}, {8'h00, 3'b111});

    // External reset clears the registers.
    rstn = 1'b0; #20ns rstn = 1'b1;
    check("mask after reset", trigger_channel_mask, 8'h00);
    check("short pause exercised", quick_pause_ok, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
