// tb_rt_fifo -- checks the measurement FIFO against a queue model.
//
// Random pushes and pops are compared entry by entry with a SystemVerilog
// queue. Also checked: the interrupt rises exactly when a push brings the fill
// level to half the depth and stays until cleared, a push into a full FIFO is
// dropped and sets the overflow flag, and `clear` empties the FIFO.
`timescale 1ns/1ps
module tb_rt_fifo;
  import i4c_pkg::*;

  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic clear = 0, push = 0, pop = 0, irq_clr = 0;
  rt_event_t wr_data, rd_data;
  logic empty, full, irq, overflow;
  logic [$clog2(DEPTH+1)-1:0] level;

  rt_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .push, .wr_data, .pop,
                                .rd_data, .empty, .full, .level, .irq,
                                .irq_clr, .overflow);

  int checks = 0, failures = 0;
  rt_event_t q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic do_op(input bit pu, input bit po);
    rt_event_t d;
    d = rt_event_t'($urandom);
    @(negedge clk);
    push = pu; pop = po; wr_data = d;
    if (po && q.size() > 0) begin
      check(rd_data == q[0], $sformatf("pop data %h expected %h", rd_data, q[0]));
    end
    @(posedge clk); #1;
    if (po && q.size() > 0) void'(q.pop_front());
    if (pu && q.size() < DEPTH) q.push_back(d);
    push = 0; pop = 0;
    check(int'(level) == q.size(), $sformatf("level %0d expected %0d", level, q.size()));
    check(empty == (q.size() == 0) && full == (q.size() == DEPTH), "empty/full flags");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(empty && !irq && !overflow, "reset state");

    // fill to 3: no interrupt; the 4th push raises it
    repeat (3) do_op(1, 0);
    check(!irq, "no interrupt below half full");
    do_op(1, 0);
    check(irq, "interrupt at half full");
    do_op(0, 1);
    check(irq, "interrupt held until cleared");
    @(negedge clk) irq_clr = 1;
    @(negedge clk) irq_clr = 0;
    check(!irq, "interrupt cleared");

    // fill up and overflow
    while (q.size() < DEPTH) do_op(1, 0);
    check(full, "full");
    do_op(1, 0);
    check(overflow, "overflow on push into full FIFO");
    // drain everything and compare
    while (q.size() > 0) do_op(0, 1);
    @(negedge clk) irq_clr = 1;
    @(negedge clk) irq_clr = 0;
    check(!overflow && !irq, "flags cleared");

    // random traffic
    for (int i = 0; i < 2000; i++) do_op($urandom_range(0, 1), $urandom_range(0, 1));

    // clear
    do_op(1, 0); do_op(1, 0);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    q.delete();
    check(empty && level == 0, "clear empties the FIFO");

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
