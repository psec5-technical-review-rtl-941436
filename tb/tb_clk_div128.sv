// tb_clk_div128: with a 5 GHz (200 ps) input, measures the period of
// every stage: q[i] must repeat every 200 ps * 2^(i+1), so q[0] is
// 2.5 GHz and q[6] 5 GHz / 128 (25.6 ns).
module tb_clk_div128;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0;
  logic [6:0] q;
  int checks = 0, failures = 0;
  realtime last [7];
  realtime per [7];

  clk_div128 dut (.*);

  always #100 clk = ~clk;
  for (genvar i = 0; i < 7; i++) begin : g_m
    always @(posedge q[i]) begin
      if (last[i] != 0) per[i] = $realtime - last[i];
      last[i] = $realtime;
    end
  end

  initial begin
    for (int i = 0; i < 7; i++) begin last[i] = 0; per[i] = 0; end
    #200ns;
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (per[i] != 200.0 * (2 ** (i + 1))) begin
        failures++; $display("FAIL stage %0d period %0t", i, per[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
