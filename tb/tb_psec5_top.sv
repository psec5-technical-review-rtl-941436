// tb_psec5_top: end-to-end test of the digital core at its full size
// (8 channels, 4 x 64 fast cells and 1024 slow cells per channel).
//
// A 10 GHz clock stands in for the oscillator. The test talks to the chip
// over SPI only, as the FPGA would, and watches the switch controls:
//   - clock tree: clkout period 25.6 ns, stops when clk_en is dropped;
//   - SPI: writes and read-back of mask/instruction/mode, internal reset
//     between transactions, counter addressing for registers 4..10;
//   - mode 0: after START the switches of bank 0 open one cell every 25 ps
//     in order around its 64 cells, the slow bank one cell every 200 ps;
//     an enabled discriminator hands over to the next bank, a masked one
//     does nothing, trig_in counts too; after 4 edges all switches are open;
//   - mode 1 (2 edges) and mode 2 (one 256-cell ring over all four banks,
//     checked in order, 1 edge).
// Every mechanism is counted and a mechanism that never happened fails.
module tb_psec5_top;
  timeunit 1ps; timeprecision 1ps;
  import psec5_pkg::*;

  logic clk10 = 1'b0, clk_en = 1'b1, rstn = 1'b1, sclk = 1'b0, pico = 1'b0;
  logic poci, trig_in = 1'b0, trig_out, clkout;
  logic [7:0] disc = '0;
  logic [7:0] load_cnt_ser;
  logic [2:0] select_reg;
  logic [7:0][3:0][63:0] fast_sw;
  logic [7:0][1023:0] slow_sw;

  int checks = 0, failures = 0;

  psec5_top dut (.*);

  always #50 clk10 = ~clk10;

  // ------------------------------------------------------------ helpers
  task automatic check(input string what, input bit ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #400us failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_spi_write = 0, n_spi_read = 0, n_int_reset = 0, n_handover = 0,
      n_masked_ignored = 0, n_ext_trig = 0, n_done = 0, n_mode [3] = '{0, 0, 0},
      n_clk_gated = 0, n_cnt_addr = 0;
  always @(negedge dut.u_spi.u_pico.sclk_stop_rstn) n_int_reset++;
  always @(posedge dut.u_ctrl.done) n_done++;

  task automatic spi_byte(input logic [7:0] tx, output logic [7:0] rx);
    for (int b = 7; b >= 0; b--) begin
      pico = tx[b];
      #12500;
      rx[b] = poci;
      sclk = 1'b1;
      #12500;
      sclk = 1'b0;
    end
  endtask

  task automatic spi_end(); repeat (12) @(posedge clkout); endtask

  task automatic spi_write(input logic [6:0] a, input logic [7:0] v);
    logic [7:0] rx;
    spi_byte({1'b1, a}, rx); spi_byte(v, rx); spi_end();
    n_spi_write++;
  endtask

  task automatic spi_read(input logic [6:0] a, output logic [7:0] v);
    logic [7:0] rx;
    spi_byte({1'b0, a}, rx); spi_byte(8'h00, v); spi_end();
    n_spi_read++;
  endtask

  // ------------------------------------------------------------ recorders
  // Sampling instant of a cell = falling edge of its switch control.
  typedef struct { int idx; longint t; } ev_t;
  ev_t ev_fast[$], ev_slow[$];
  bit rec = 1'b0;
  for (genvar c = 0; c < 4; c++) begin : g_rc
    for (genvar i = 0; i < 64; i++) begin : g_ri
      always @(negedge fast_sw[0][c][i]) if (rec) ev_fast.push_back('{c * 64 + i, longint'($time)});
    end
  end
  for (genvar i = 0; i < 1024; i++) begin : g_rs
    always @(negedge slow_sw[0][i]) if (rec) ev_slow.push_back('{i, longint'($time)});
  end

  // Events of one bank group must walk n cells starting at first, step apart.
  task automatic check_walk(input string name, ref ev_t ev[$], input int first, input int n,
                            input longint step, input int min_len);
    int bad = 0;
    check($sformatf("%s: %0d sampling instants", name, ev.size()), ev.size() >= min_len);
    for (int k = 1; k < ev.size(); k++)
      if (ev[k].t - ev[k-1].t != step ||
          ev[k].idx != first + ((ev[k-1].idx - first + 1) % n)) bad++;
    check($sformatf("%s: in order, %0d ps apart (%0d bad)", name, step, bad), bad == 0);
  endtask

  task automatic check_channels_equal(input string name);
    bit same = 1'b1;
    for (int ch = 1; ch < 8; ch++)
      if (fast_sw[ch] != fast_sw[0] || slow_sw[ch] != slow_sw[0]) same = 1'b0;
    check({name, ": all channels identical"}, same);
  endtask

  // Pulse a trigger source and check the bank hand-over.
  task automatic trigger(input int src, input bit expect_move);
    logic [3:0] en_before;
    int e0;
    en_before = dut.u_ctrl.fast_en; e0 = dut.u_ctrl.edges;
    if (src < 0) trig_in = 1'b1; else disc[src] = 1'b1;
    #500;
    if (src >= 0) check($sformatf("trig_out follows disc[%0d]", src), trig_out == expect_move);
    trig_in = 1'b0; disc = '0;
    #2000;
    if (expect_move) begin
      check("trigger counted", dut.u_ctrl.edges == e0 + 1);
      check("group handed over", dut.u_ctrl.fast_en != en_before);
      n_handover++;
      if (src < 0) n_ext_trig++;
    end else begin
      check("masked trigger ignored", dut.u_ctrl.edges == e0 && dut.u_ctrl.fast_en == en_before);
      n_masked_ignored++;
    end
  endtask

  // ------------------------------------------------------------ test
  realtime t1, t2;
  logic [7:0] v;

  initial begin
    #1 rstn = 1'b0; #2ns rstn = 1'b1;

    // clock tree
    @(posedge clkout); t1 = $realtime; @(posedge clkout); t2 = $realtime;
    check($sformatf("clkout period %0t", t2 - t1), t2 - t1 == 25600);
    spi_end();

    // registers
    spi_write(REG_TRIG_MASK, 8'h05);     // channels 0 and 2
    spi_write(REG_MODE, MODE_1BANK);
    spi_write(REG_INSTR, INSTR_RESET);
    spi_read(REG_TRIG_MASK, v); check("read mask", v == 8'h05);
    spi_read(REG_MODE, v);      check("read mode", v == 8'h00);
    spi_read(REG_INSTR, v);     check("read instruction", v == 8'h01);
    check("idle: loading", dut.u_ctrl.load && fast_sw == '0 && slow_sw == '0);

    // counter addressing: registers 4..10 = counter 0, 11 = counter 1
    begin
      logic [7:0] rx;
      spi_byte(8'h04, rx);
      for (int a = 4; a <= 11; a++) begin
        check($sformatf("counter select for reg %0d", a),
              load_cnt_ser == 8'(1 << ((a - 4) / 7)) && select_reg == 3'((a - 4) % 7));
        n_cnt_addr++;
        for (int b = 7; b >= 0; b--) begin pico = 1'b0; #12500 sclk = 1'b1; #12500 sclk = 1'b0; end
      end
      spi_end();
    end

    // ---------------- mode 0: four edges of 1.6 ns
    spi_write(REG_INSTR, INSTR_START);
    #2ns; rec = 1'b1;
    #12ns;                           // > 7 laps of a 1.6 ns bank
    rec = 1'b0;
    check("mode 0: only bank 0 samples", dut.u_ctrl.fast_en == 4'b0001);
    check_walk("mode 0 bank 0", ev_fast, 0, 64, 25, 400);
    check_walk("slow bank", ev_slow, 0, 1024, 200, 50);
    check_channels_equal("mode 0 running");
    ev_fast.delete(); ev_slow.delete();
    trigger(2, 1'b1);                // enabled channel
    trigger(1, 1'b0);                // masked channel
    rec = 1'b1; #3ns; rec = 1'b0;
    check_walk("mode 0 bank 1", ev_fast, 64, 64, 25, 100);
    ev_fast.delete(); ev_slow.delete();
    trigger(0, 1'b1);
    trigger(-1, 1'b1);               // external trigger in
    trigger(2, 1'b1);
    check("mode 0: done after 4 edges", dut.u_ctrl.done && dut.u_ctrl.edges == 4);
    #1ns;
    check("mode 0: all switches open", fast_sw == '0 && slow_sw == '0);
    n_mode[0]++;

    // ---------------- mode 1: two edges of 3.2 ns
    spi_write(REG_INSTR, INSTR_RESET);
    spi_write(REG_MODE, MODE_2BANK);
    spi_write(REG_INSTR, INSTR_START);
    #2ns; rec = 1'b1; #8ns; rec = 1'b0;
    check_walk("mode 1 banks 0+1", ev_fast, 0, 128, 25, 300);
    ev_fast.delete(); ev_slow.delete();
    trigger(-1, 1'b1);
    rec = 1'b1; #8ns; rec = 1'b0;
    check_walk("mode 1 banks 2+3", ev_fast, 128, 128, 25, 300);
    ev_fast.delete(); ev_slow.delete();
    trigger(2, 1'b1);
    check("mode 1: done after 2 edges", dut.u_ctrl.done && dut.u_ctrl.edges == 2);
    n_mode[1]++;

    // ---------------- mode 2: one edge of 6.4 ns
    spi_write(REG_INSTR, INSTR_RESET);
    spi_write(REG_MODE, MODE_4BANK);
    spi_write(REG_INSTR, INSTR_START);
    #2ns; rec = 1'b1; #14ns; rec = 1'b0;
    check_walk("mode 2 all banks", ev_fast, 0, 256, 25, 500);
    check_channels_equal("mode 2 running");
    ev_fast.delete(); ev_slow.delete();
    trigger(0, 1'b1);
    check("mode 2: done after 1 edge", dut.u_ctrl.done && dut.u_ctrl.edges == 1);
    #1ns;
    check("mode 2: all switches open", fast_sw == '0 && slow_sw == '0);
    n_mode[2]++;

    // ---------------- clock gating
    clk_en = 1'b0;
    #100ns;
    t1 = $realtime;
    fork
      begin @(posedge clkout); t2 = $realtime; end
      #200ns t2 = 0;
    join_any
    disable fork;
    check("clkout stopped with clk_en low", t2 == 0);
    if (t2 == 0) n_clk_gated++;

    // ---------------- every mechanism seen
    check($sformatf("SPI writes %0d", n_spi_write), n_spi_write > 0);
    check($sformatf("SPI reads %0d", n_spi_read), n_spi_read > 0);
    check($sformatf("internal resets %0d", n_int_reset), n_int_reset > 0);
    check($sformatf("counter addressing %0d", n_cnt_addr), n_cnt_addr > 0);
    check($sformatf("bank hand-overs %0d", n_handover), n_handover > 0);
    check($sformatf("masked triggers %0d", n_masked_ignored), n_masked_ignored > 0);
    check($sformatf("external triggers %0d", n_ext_trig), n_ext_trig > 0);
    check($sformatf("captures done %0d", n_done), n_done > 0);
    for (int m = 0; m < 3; m++) check($sformatf("mode %0d runs %0d", m, n_mode[m]), n_mode[m] > 0);
    check($sformatf("clock gating %0d", n_clk_gated), n_clk_gated > 0);

    $display("mechanisms: wr=%0d rd=%0d intrst=%0d cnt=%0d handover=%0d masked=%0d ext=%0d done=%0d modes=%0d/%0d/%0d gate=%0d",
             n_spi_write, n_spi_read, n_int_reset, n_cnt_addr, n_handover, n_masked_ignored,
             n_ext_trig, n_done, n_mode[0], n_mode[1], n_mode[2], n_clk_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
