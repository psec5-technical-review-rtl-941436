// tb_detff: random D changed between edges; after every rising and every
// falling edge q must equal the D seen at that edge. Also checks hold
// (en low), load and the asynchronous reset.
module tb_detff;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, rstn = 1'b1, en = 1'b1, load = 1'b0, init = 1'b0, d = 1'b0;
  logic q, exp;
  int checks = 0, failures = 0;

  detff dut (.clk, .rstn, .en, .load, .init, .d, .q);

  task automatic edge_and_check(input string what);
    if (load) exp = init; else if (en) exp = d;
    #50 clk = ~clk;
    #10;
    checks++;
    if (q !== exp) begin failures++; $display("FAIL %s at %0t: q=%b exp=%b", what, $time, q, exp); end
    #40;
  endtask

  initial begin
    #1 rstn = 1'b0; #1;
    checks++; if (q !== 1'b0) failures++;
    rstn = 1'b1; exp = 1'b0;
    repeat (200) begin d = 1'($urandom); edge_and_check("both edges"); end
    en = 1'b0;
    repeat (20) begin d = 1'($urandom); edge_and_check("hold"); end
    load = 1'b1; init = 1'b1;
    repeat (2) edge_and_check("load");
    load = 1'b0; en = 1'b1;
    repeat (50) begin d = 1'($urandom); edge_and_check("again"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
