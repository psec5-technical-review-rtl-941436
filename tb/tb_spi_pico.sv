// tb_spi_pico: checks byte assembly, address capture and increment, the
// byte_last/byte_start timing and the sclk pause detector (internal reset
// after IDLE_ICLK quiet iclk cycles, none after a short pause).
module tb_spi_pico;
  timeunit 1ps; timeprecision 1ps;

  logic iclk = 1'b0, rstn = 1'b1, sclk = 1'b0, serial_in = 1'b0;
  logic msg_flag, sclk_stop_rstn, byte_last, byte_start;
  logic [7:0] mux_control_signal, write_data;
  int checks = 0, failures = 0, resets_seen = 0;

  spi_pico dut (.*);

  always #12800 iclk = ~iclk;
  always @(negedge sclk_stop_rstn) resets_seen++;

  initial begin
    #2ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  // Sends a byte; checks write_data/byte_last just before the 8th edge.
  task automatic send(input logic [7:0] tx, input logic expect_data);
    for (int b = 7; b >= 0; b--) begin
      serial_in = tx[b];
      #12500;
      if (b == 0) begin
        check("byte_last", byte_last, 1'b1);
        check("write_data", write_data, tx);
      end else check("not last", byte_last, 1'b0);
      if (b == 7) check("byte_start", byte_start, expect_data);
      sclk = 1'b1; #12500 sclk = 1'b0;
    end
  endtask

  task automatic idle(input int n); repeat (n) @(posedge iclk); endtask

  initial begin
    #1ns rstn = 1'b0; #30ns rstn = 1'b1;
    idle(2);
    check("no address yet", msg_flag, 1'b0);
    send(8'h85, 1'b0);
    check("msg_flag", msg_flag, 1'b1);
    check("address", mux_control_signal, 8'h85);
    send(8'h11, 1'b1);
    check("increment", mux_control_signal, 8'h86);
    idle(3);                          // short pause: no reset
    check("no reset on short pause", resets_seen, 0);
    send(8'h22, 1'b1);
    check("increment 2", mux_control_signal, 8'h87);
    idle(12);
    check("one internal reset", resets_seen, 1);
    check("flag cleared", msg_flag, 1'b0);
    check("address cleared", mux_control_signal, 8'h00);
    // address wraps in 7 bits and keeps the write flag
    send(8'hFF, 1'b0);
    send(8'h00, 1'b1);
    check("wrap keeps flag", mux_control_signal, 8'h80);
    idle(12);
    check("two internal resets", resets_seen, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
