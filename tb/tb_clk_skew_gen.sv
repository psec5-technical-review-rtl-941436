// tb_clk_skew_gen: measures the delay of each phase's rising edge behind
// the input: phase i must follow by i * 25 ps.
module tb_clk_skew_gen;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0;
  logic [3:0] clk_ph;
  realtime t_in, t_ph [4];
  int checks = 0, failures = 0;

  clk_skew_gen dut (.*);

  always #100 clk = ~clk;
  always @(posedge clk) t_in = $realtime;
  for (genvar i = 0; i < 4; i++) begin : g_m
    always @(posedge clk_ph[i]) t_ph[i] = $realtime;
  end

  initial begin
    repeat (5) @(posedge clk);
    #90;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (t_ph[i] - t_in != 25.0 * i) begin
        failures++; $display("FAIL phase %0d delay %0t", i, t_ph[i] - t_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
