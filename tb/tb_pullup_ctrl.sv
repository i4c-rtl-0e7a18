// tb_pullup_ctrl -- checks the pull-up selection FSM against a model.
//
// Random calibration results (tx with a rise time) and Block pulses are
// applied; after each one the resistor select, the FSM state and the red-zone
// flag are compared with a model of the rules: above the window one resistor
// step down, below it one step up, inside it hold, Block forces the smallest
// resistor, and red zone when too slow at the smallest resistor. Selection
// changes take effect one cycle after the input.
`timescale 1ns/1ps
module tb_pullup_ctrl;
  import i4c_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic tx = 0, block = 0;
  rt_t  trise = '0;
  rt_t  gmin = 13, gmax = 125;
  rsel_t rsel;
  logic [1:0] st;
  logic red_zone, rsel_changed;

  pullup_ctrl dut (.clk, .rst_n, .tx, .trise, .block, .gmin, .gmax, .rsel,
                   .state_o(st), .red_zone, .rsel_changed);

  int checks = 0, failures = 0;
  int m_sel = 0, m_st = 0;
  bit m_red = 0;
  int n_up = 0, n_down = 0, n_hold = 0, n_block = 0, n_red = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic apply(input bit t, input bit b, input int r);
    int old;
    old = m_sel;
    @(negedge clk);
    tx = t; block = b; trise = rt_t'(r);
    if (b) begin
      m_sel = 0; m_st = 0; n_block++;
    end else if (t) begin
      if (r > 125) begin
        m_st = 3; m_red = (m_sel == 0);
        if (m_red) n_red++;
        if (m_sel > 0) begin m_sel--; n_down++; end
      end else if (r < 13) begin
        m_st = 1; m_red = 0;
        if (m_sel < 3) begin m_sel++; n_up++; end
      end else begin
        m_st = 2; m_red = 0; n_hold++;
      end
    end
    @(posedge clk); #1;
    check(rsel_changed == (m_sel != old), "rsel_changed pulse");
    tx = 0; block = 0;
    check(int'(rsel) == m_sel, $sformatf("rsel %0d expected %0d", rsel, m_sel));
    check(int'(st) == m_st, $sformatf("state %0d expected %0d", st, m_st));
    check(red_zone == m_red, "red zone flag");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(rsel == 0 && st == 0, "reset: S0 with the smallest resistor");
    // walk up to the largest resistor and saturate
    repeat (5) apply(1, 0, 5);
    check(rsel == 3, "saturates at the largest resistor");
    // boundaries of the window
    apply(1, 0, 13);
    apply(1, 0, 125);
    apply(1, 0, 126);
    apply(1, 0, 12);
    // walk down to the smallest and beyond: red zone
    repeat (5) apply(1, 0, 400);
    check(red_zone, "red zone at Rmin");
    apply(1, 0, 60);
    // Block from a raised resistor
    apply(1, 0, 2); apply(1, 0, 2);
    apply(0, 1, 0);
    // idle cycles change nothing
    apply(0, 0, 999);
    for (int i = 0; i < 3000; i++) begin
      int k = $urandom_range(0, 19);
      apply(k != 0, k == 0, $urandom_range(0, 200));
    end
    check(n_up > 0 && n_down > 0 && n_hold > 0 && n_block > 0 && n_red > 0,
          "all transitions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
