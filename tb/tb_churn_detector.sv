// tb_churn_detector -- checks device-churn detection between transactions.
//
// Applies a sequence of calibration rise times with the resistor selection
// used for each. Churn must be flagged exactly when the previous measurement
// used the same resistor and the value moved by more than DELTA; the first
// measurement and measurements after a resistor change are never flagged.
`timescale 1ns/1ps
module tb_churn_detector;
  import i4c_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic cal_valid = 0, churn;
  rt_t cal_rt = 0, last_rt;
  rsel_t rsel = 0;

  churn_detector #(.DELTA(1)) dut (.clk, .rst_n, .cal_valid, .cal_rt, .rsel,
                                   .churn, .last_rt);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int m_prev = -1, m_sel = -1;
  task automatic meas(input int r, input int s);
    bit exp;
    exp = (m_prev >= 0) && (s == m_sel) && ((r > m_prev ? r - m_prev : m_prev - r) > 1);
    @(negedge clk);
    cal_valid = 1; cal_rt = rt_t'(r); rsel = rsel_t'(s);
    @(negedge clk);
    cal_valid = 0;
    check(churn == exp, $sformatf("rt %0d sel %0d after %0d/%0d: churn=%0b", r, s, m_prev, m_sel, churn));
    check(int'(last_rt) == r, "stored value");
    @(negedge clk);
    check(!churn, "churn is a single pulse");
    m_prev = r; m_sel = s;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    meas(100, 1);   // first: never churn
    meas(101, 1);   // within DELTA
    meas(99, 1);    // 2 below: churn
    meas(150, 2);   // new resistor: no churn
    meas(150, 2);
    meas(170, 2);   // device joined: churn
    meas(60, 2);    // device left: churn
    for (int i = 0; i < 500; i++)
      meas($urandom_range(10, 14), ($urandom_range(0, 7) == 0) ? $urandom_range(0, 3) : m_sel);
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
