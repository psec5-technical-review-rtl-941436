// tb_clk_div2: with a 10 GHz input, checks a 5 GHz output (one output
// rising edge per two input cycles, 200 ps apart) while enabled, and a
// stopped, low output after the enable is dropped.
module tb_clk_div2;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, rstb = 1'b1, enable = 1'b0, q, qb;
  int checks = 0, failures = 0, rises = 0;
  realtime last_rise = 0, period = 0;

  clk_div2 dut (.*);

  always #50 clk = ~clk;
  always @(posedge q) begin
    rises++;
    if (last_rise != 0) period = $realtime - last_rise;
    last_rise = $realtime;
  end

  task automatic check(input string what, input bit ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1 rstb = 1'b0; #300 rstb = 1'b1;
    repeat (10) @(posedge clk);
    check("disabled: no edges", rises == 0 && q == 1'b0);
    enable = 1'b1;
    repeat (4) @(posedge clk);
    rises = 0;
    repeat (200) @(posedge clk);
    check($sformatf("100 output cycles in 200 input cycles (%0d)", rises), rises == 100);
    check($sformatf("period 200 ps (%0t)", period), period == 200);
    check("qb is inverse", qb == ~q);
    enable = 1'b0;
    repeat (4) @(posedge clk);
    rises = 0;
    repeat (50) @(posedge clk);
    check("stopped after disable", rises == 0 && q == 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
