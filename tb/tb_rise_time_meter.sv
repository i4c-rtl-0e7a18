// tb_rise_time_meter -- checks the rise-time FSM with exact cycle timing.
//
// Drives the two synchronized comparator inputs directly. For a rise in which
// the high comparator follows the low one by D cycles the meter must report
// exactly D, one cycle after the high comparator is seen, with no warning.
// Also checked: a rise faster than one cycle (count 0 and the resolution
// warning), a drop back below the low threshold during a rise (capacitance
// warning and no result), and that nothing is reported while the line stays
// high or low.
`timescale 1ns/1ps
module tb_rise_time_meter;
  import i4c_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic lo = 1, hi = 1;
  logic ev_valid, cap_warn, res_warn;
  rt_event_t ev;

  rise_time_meter dut (.clk, .rst_n, .above_lo(lo), .above_hi(hi),
                       .ev_valid, .ev, .cap_warn, .res_warn_pulse(res_warn));

  int checks = 0, failures = 0;
  int n_ev = 0, n_cap = 0, n_res = 0;
  always @(posedge clk) begin
    if (ev_valid) n_ev++;
    if (cap_warn) n_cap++;
    if (res_warn) n_res++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic fall();
    @(negedge clk) begin lo = 0; hi = 0; end
    repeat (3) @(negedge clk);
  endtask

  // Rise with the high comparator D cycles after the low one.
  task automatic rise(input int d);
    int e0, lat;
    fall();
    e0 = n_ev;
    lo = 1;
    repeat (d) @(negedge clk);
    hi = 1;
    lat = 0;
    // result is due in the cycle after the high comparator is sampled
    @(posedge clk); #1;
    check(ev_valid, $sformatf("D=%0d: result one cycle after the 70%% crossing", d));
    check(ev.count == rt_t'(d), $sformatf("D=%0d: count %0d", d, ev.count));
    check(!ev.res_warn, $sformatf("D=%0d: no resolution flag", d));
    @(posedge clk); #1;
    check(!ev_valid, "result lasts one cycle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(n_ev == 0, "no result while the line idles high");

    rise(1);
    rise(2);
    rise(17);
    for (int i = 0; i < 40; i++) rise(1 + int'($urandom_range(0, 400)));

    // both thresholds in the same cycle: resolution warning
    begin
      int r0;
      fall();
      r0 = n_res;
      lo = 1; hi = 1;
      @(posedge clk); #1;
      check(ev_valid && ev.count == 0 && ev.res_warn, "resolution warning result");
      check(res_warn && n_res == r0, "resolution warning pulse with the result");
    end

    // drop during the rise: capacitance warning, no result
    begin
      int c0, e0;
      fall();
      c0 = n_cap;
      e0 = n_ev;
      lo = 1;
      repeat (6) @(negedge clk);
      lo = 0;
      repeat (4) @(negedge clk);
      check(n_cap == c0 + 1, "capacitance warning");
      check(n_ev == e0, "no result for an interrupted rise");
      // the next rise is measured normally
      lo = 1;
      repeat (9) @(negedge clk);
      hi = 1;
      @(posedge clk); #1;
      check(ev_valid && ev.count == 9, "rise after a warning measured");
    end

    // line stays low: nothing reported
    begin
      int e0;
      fall();
      e0 = n_ev;
      repeat (50) @(posedge clk);
      check(n_ev == e0, "no result while the line stays low");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
