// tb_bank_ctrl: runs one capture in each mode (1, 2 and 4 fast banks per
// edge) and checks, against the register-map definition of the modes:
// ring links and heads, which banks sample in each group, that each
// trigger edge hands over to the next group three clock cycles after it
// arrives (two-flop synchroniser plus edge detector), DONE after the last
// group with everything stopped, triggers ignored outside RUN, mode
// changes ignored while running, and RESET back to IDLE.
module tb_bank_ctrl;
  timeunit 1ps; timeprecision 1ps;
  import psec5_pkg::*;

  logic clk = 1'b0, rstn = 1'b1, trig = 1'b0;
  logic [7:0] instruction = INSTR_NONE, mode = MODE_1BANK;
  logic load, slow_en, done;
  logic [3:0] head, fast_en;
  logic [3:0][1:0] tok_src;
  logic [1:0] group;
  logic [2:0] edges;
  int checks = 0, failures = 0;

  bank_ctrl dut (.*);

  always #100 clk = ~clk;

  initial begin
    #1us failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic cyc(input int n); repeat (n) @(posedge clk); #1; endtask

  task automatic run_mode(input int m);
    int g_size, n_groups, lat;
    logic [3:0] exp_en;
    g_size = (m == 0) ? 1 : (m == 1) ? 2 : 4;
    n_groups = 4 / g_size;
    mode = 8'(m);
    instruction = INSTR_RESET; cyc(4);
    check($sformatf("m%0d idle: loading, nothing sampling", m), load && fast_en == 0 && !slow_en && !done);
    for (int c = 0; c < 4; c++) begin
      check($sformatf("m%0d head[%0d]", m, c), head[c] == (c % g_size == 0));
      check($sformatf("m%0d tok_src[%0d]", m, c),
            tok_src[c] == ((c % g_size != 0) ? c - 1 : c + g_size - 1));
    end
    trig = 1'b1; cyc(4); trig = 1'b0; cyc(2);
    check("trigger ignored in idle", load && edges == 0);
    instruction = INSTR_START; cyc(4);
    mode = 8'hFF;                      // must not matter while running
    for (int g = 0; g < n_groups; g++) begin
      exp_en = '0;
      for (int c = 0; c < 4; c++) if (c / g_size == g) exp_en[c] = 1'b1;
      check($sformatf("m%0d group %0d banks %b got %b", m, g, exp_en, fast_en),
            fast_en == exp_en && slow_en && !load && group == 2'(g));
      // trigger edge: count cycles until the hand-over
      @(posedge clk); #1; trig = 1'b1;
      lat = 0;
      while (fast_en == exp_en && lat < 10) begin cyc(1); lat++; end
      check($sformatf("m%0d hand-over latency %0d cycles", m, lat), lat == 3);
      cyc(3); trig = 1'b0; cyc(3);
    end
    check($sformatf("m%0d done, all stopped", m), done && fast_en == 0 && !slow_en);
    check($sformatf("m%0d edges %0d", m, edges), edges == 3'(n_groups));
    trig = 1'b1; cyc(4); trig = 1'b0; cyc(3);
    check("trigger ignored when done", done && edges == 3'(n_groups));
    instruction = INSTR_READOUT; cyc(4);
    check("readout keeps DONE", done);
  endtask

  initial begin
    #1 rstn = 1'b0; #10 rstn = 1'b1;
    run_mode(0);
    run_mode(1);
    run_mode(2);
    instruction = INSTR_RESET; cyc(4);
    check("reset to idle", load && !done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
