// tb_stuck_bus_detector -- checks the stuck-low timeout to the cycle.
//
// Uses a short TIMEOUT. A line low for TIMEOUT-1 cycles must not be flagged;
// a line held low is flagged exactly TIMEOUT cycles after it went low and the
// flag drops one cycle after the line comes back.
`timescale 1ns/1ps
module tb_stuck_bus_detector;
  localparam int T = 40;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic line_low = 0, stuck;
  stuck_bus_detector #(.TIMEOUT(T)) dut (.clk, .rst_n, .line_low, .stuck);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // short low pulses
    for (int k = 0; k < 5; k++) begin
      int len = (k == 0) ? T - 1 : $urandom_range(1, T - 1);
      @(negedge clk) line_low = 1;
      for (int i = 0; i < len; i++) begin
        @(posedge clk); #1;
        check(!stuck, "not stuck before the timeout");
      end
      @(negedge clk) line_low = 0;
      @(posedge clk); #1;
      check(!stuck, "not stuck after a short low");
    end
    // held low
    @(negedge clk) line_low = 1;
    for (int i = 1; i <= T + 20; i++) begin
      @(posedge clk); #1;
      check(stuck == (i >= T), $sformatf("cycle %0d low: stuck=%0b", i, stuck));
    end
    @(negedge clk) line_low = 0;
    @(posedge clk); #1;
    check(!stuck, "flag drops when the line is released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
