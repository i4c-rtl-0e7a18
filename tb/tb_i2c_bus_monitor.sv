// tb_i2c_bus_monitor -- checks start/stop detection and edge numbering.
//
// Bit-bangs SCL/SDA levels (already synchronous) through transactions of
// random length, a repeated start and idle SCL pulses. Each SCL rising edge
// inside a transaction must come with edge_p and the right edge number,
// byte frame and position; start and stop must pulse once each and bound
// in_tx; SCL pulses outside a transaction must not be numbered.
`timescale 1ns/1ps
module tb_i2c_bus_monitor;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic scl = 1, sda = 1;
  logic in_tx, start_p, stop_p, edge_p;
  logic [7:0] edge_idx;
  logic [3:0] frame, pos;

  i2c_bus_monitor dut (.clk, .rst_n, .scl, .sda, .in_tx, .start_p, .stop_p,
                       .edge_p, .edge_idx, .frame, .pos);

  int checks = 0, failures = 0;
  int n_start = 0, n_stop = 0, n_edge = 0, exp_edge = 0;
  bit expect_tx = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (start_p) n_start++;
    if (stop_p) n_stop++;
    if (edge_p) begin
      n_edge++;
      checks++;
      if (int'(edge_idx) != exp_edge || int'(frame) != (exp_edge - 1) / 9 ||
          int'(pos) != (exp_edge - 1) % 9) begin
        failures++;
        $display("FAIL @%0t: edge %0d frame %0d pos %0d, expected edge %0d",
                 $time, edge_idx, frame, pos, exp_edge);
      end
    end
  end

  localparam int HP = 6;  // half an SCL period in clock cycles
  task automatic wait_cyc(input int n); repeat (n) @(negedge clk); endtask

  task automatic clk_pulse(input logic b);
    sda = b; wait_cyc(HP / 2);
    if (expect_tx) exp_edge++;
    scl = 1; wait_cyc(HP);
    scl = 0; wait_cyc(HP / 2);
  endtask

  task automatic start();
    sda = 0; wait_cyc(HP);
    expect_tx = 1; exp_edge = 0;
    scl = 0; wait_cyc(HP / 2);
  endtask

  task automatic stop();
    sda = 0; wait_cyc(HP / 2);
    exp_edge++;
    scl = 1; wait_cyc(HP);
    sda = 1; wait_cyc(HP);
    expect_tx = 0;
  endtask

  task automatic txn(input int nbytes);
    int s0, p0, e0;
    s0 = n_start; p0 = n_stop; e0 = n_edge;
    start();
    check(in_tx, "in_tx after start");
    for (int b = 0; b < nbytes; b++) for (int i = 0; i < 9; i++) clk_pulse($urandom_range(0, 1));
    stop();
    check(!in_tx, "in_tx cleared after stop");
    check(n_start == s0 + 1 && n_stop == p0 + 1, "one start and one stop");
    check(n_edge == e0 + 9 * nbytes + 1, $sformatf("%0d edges counted", n_edge - e0));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_cyc(5);
    txn(1);
    txn(3);
    // SCL pulses on an idle bus are not numbered
    begin
      int e0;
      e0 = n_edge;
      for (int i = 0; i < 3; i++) begin scl = 0; wait_cyc(HP); scl = 1; wait_cyc(HP); end
      check(n_edge == e0 && !in_tx, "idle SCL pulses ignored");
    end
    // repeated start keeps the numbering
    start();
    for (int i = 0; i < 9; i++) clk_pulse(1);
    sda = 1; wait_cyc(HP / 2);
    exp_edge++;
    scl = 1; wait_cyc(HP / 2);
    sda = 0; wait_cyc(HP / 2);       // repeated start
    scl = 0; wait_cyc(HP / 2);
    check(in_tx && int'(edge_idx) == 10, "repeated start continues numbering");
    for (int i = 0; i < 9; i++) clk_pulse(0);
    stop();
    for (int k = 0; k < 20; k++) txn($urandom_range(1, 6));
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
