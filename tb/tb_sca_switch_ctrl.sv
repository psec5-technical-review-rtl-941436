// tb_sca_switch_ctrl: runs token rings on skewed clocks and records the
// instant each switch opens (the sampling instant). Checks, independently
// of the chain's structure, that sampling instants are evenly spaced and
// walk the cells in order around the ring:
//   A: one 16-cell column, 4 phases 25 ps apart on a 5 GHz clock: 25 ps,
//   B: one 8-cell column, 1 phase, 2.5 GHz clock: 200 ps,
//   C+D: two 16-cell columns linked into one 32-cell ring: 25 ps.
// Also checks that no switch moves while disabled or after stopping, and
// that stopping opens all switches.
module tb_sca_switch_ctrl;
  timeunit 1ps; timeprecision 1ps;

  logic clk5 = 1'b0, clk25 = 1'b0, rstn = 1'b1;
  logic en = 1'b0, load = 1'b0, en_b = 1'b0, load_b = 1'b0;
  logic [3:0] ph;
  int checks = 0, failures = 0;

  always #100 clk5 = ~clk5;
  always #200 clk25 = ~clk25;
  assign ph[0] = clk5;
  assign #25 ph[1] = clk5;
  assign #50 ph[2] = clk5;
  assign #75 ph[3] = clk5;

  // A: self ring
  logic [3:0] a_t;
  logic [15:0] sw_a;
  sca_switch_ctrl #(.CELLS(16), .PHASES(4)) u_a (
    .clk_ph(ph), .rstn, .en, .load, .head(1'b1),
    .tok_in(a_t), .tok_out(a_t), .sw(sw_a));

  // B: single phase, slow clock
  logic b_t;
  logic [7:0] sw_b;
  sca_switch_ctrl #(.CELLS(8), .PHASES(1)) u_b (
    .clk_ph(clk25), .rstn, .en(en_b), .load(load_b), .head(1'b1),
    .tok_in(b_t), .tok_out(b_t), .sw(sw_b));

  // C -> D -> C
  logic [3:0] c_t, d_t;
  logic [15:0] sw_c, sw_d;
  sca_switch_ctrl #(.CELLS(16), .PHASES(4)) u_c (
    .clk_ph(ph), .rstn, .en, .load, .head(1'b1),
    .tok_in(d_t), .tok_out(c_t), .sw(sw_c));
  sca_switch_ctrl #(.CELLS(16), .PHASES(4)) u_d (
    .clk_ph(ph), .rstn, .en, .load, .head(1'b0),
    .tok_in(c_t), .tok_out(d_t), .sw(sw_d));

  // Sampling-instant recorders: a switch opening = falling edge of sw[i].
  typedef struct { int idx; longint t; } ev_t;
  ev_t ev_a[$], ev_b[$], ev_cd[$];
  int max_on_a = 0;

  for (genvar i = 0; i < 16; i++) begin : g_a
    always @(negedge sw_a[i]) if (en) ev_a.push_back('{i, longint'($time)});
    always @(negedge sw_c[i]) if (en) ev_cd.push_back('{i, longint'($time)});
    always @(negedge sw_d[i]) if (en) ev_cd.push_back('{16 + i, longint'($time)});
  end
  for (genvar i = 0; i < 8; i++) begin : g_b
    always @(negedge sw_b[i]) if (en_b) ev_b.push_back('{i, longint'($time)});
  end
  // count tracking cells midway between skewed edges
  initial begin
    #12;
    forever begin
      #25;
      if ($countones(sw_a) > max_on_a) max_on_a = $countones(sw_a);
    end
  end

  task automatic check(input string what, input bit ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_seq(input string name, ref ev_t ev[$], input int n, input longint step, input int min_len);
    int bad = 0;
    check($sformatf("%s: %0d sampling instants", name, ev.size()), ev.size() >= min_len);
    for (int k = 1; k < ev.size(); k++) begin
      if (ev[k].t - ev[k-1].t != step || ev[k].idx != (ev[k-1].idx + 1) % n) begin
        if (bad < 5) $display("  %s: event %0d cell %0d at %0d after cell %0d at %0d",
                              name, k, ev[k].idx, ev[k].t, ev[k-1].idx, ev[k-1].t);
        bad++;
      end
    end
    check($sformatf("%s: evenly spaced, in order (%0d bad)", name, bad), bad == 0);
    if (ev.size() > 0) check($sformatf("%s: starts at cell 0", name), ev[0].idx == 0);
  endtask

  initial begin
    #10ns failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rstn = 1'b0; #10 rstn = 1'b1;
    // load the rings while disabled
    @(posedge clk25); load = 1'b1; load_b = 1'b1;
    repeat (3) @(posedge clk25);
    check("all open while loading", sw_a == 0 && sw_b == 0 && sw_c == 0 && sw_d == 0);
    @(posedge clk5); #1; load = 1'b0; en = 1'b1;
    @(posedge clk25); #1; load_b = 1'b0; en_b = 1'b1;
    #3200;                       // 2 laps of B, 4 laps of A, 2 of C+D
    @(posedge clk5); #1; en = 1'b0;
    @(posedge clk25); #1; en_b = 1'b0;
    #1000;
    begin
      int na, nb, ncd;
      na = ev_a.size(); nb = ev_b.size(); ncd = ev_cd.size();
      check("stopped: all switches open", sw_a == 0 && sw_b == 0 && sw_c == 0 && sw_d == 0);
      #1000;
      check($sformatf("no activity after stop (%0d/%0d %0d/%0d %0d/%0d)", na, ev_a.size(), nb, ev_b.size(), ncd, ev_cd.size()),
            ev_a.size() == na && ev_b.size() == nb && ev_cd.size() == ncd);
    end
    check_seq("A 40GS/s", ev_a, 16, 25, 100);
    check_seq("B 5GS/s", ev_b, 8, 200, 12);
    check_seq("C+D linked", ev_cd, 32, 25, 100);
    check($sformatf("four cells track at once (%0d)", max_on_a), max_on_a == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
