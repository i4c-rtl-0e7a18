// tb_i4c_target -- checks the target's interrupt edge and full-duplex data.
//
// Bit-bangs transactions (asynchronous to the target clock) and records at
// which SCL rising edges the active-low modulation output is on. With an
// interrupt pending, the only modulated edge among 2..10 must be edge
// (addr mod 9) + 2, for random addresses; edge 1 is never modulated. After
// fd_arm the data byte must appear MSB first on edges 19..26 of the next
// transaction, fd_sent must pulse at its stop, and the transaction after that
// carries no data.
`timescale 1ns/1ps
module tb_i4c_target;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic scl = 1, sda = 1;
  logic [6:0] addr = 0;
  logic int_req = 0, fd_arm = 0;
  logic [7:0] fd_data = 0;
  logic mod_n, fd_pending, fd_sent;
  logic [3:0] int_index;

  i4c_target dut (.clk, .rst_n, .scl_in(scl), .sda_in(sda), .addr, .int_req,
                  .fd_arm, .fd_data, .mod_n, .int_index, .fd_pending, .fd_sent);

  int checks = 0, failures = 0, n_sent = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  always @(posedge clk) if (fd_sent) n_sent++;

  localparam int HP = 100;  // ns
  logic [63:0] seen;        // bit e-1 set if edge e was modulated

  task automatic txn(input int nbytes);
    int e;
    seen = '0;
    e = 0;
    #(HP);
    sda = 0; #(HP);
    scl = 0; #(HP / 2);
    for (int i = 0; i < 9 * nbytes; i++) begin
      sda = $urandom_range(0, 1); #(HP / 2);
      scl = 1; e++; #(HP / 2);
      seen[e - 1] = !mod_n;
      #(HP / 2);
      scl = 0; #(HP / 2);
    end
    sda = 0; #(HP / 2);
    scl = 1; e++; #(HP / 2);
    seen[e - 1] = !mod_n;
    sda = 1; #(HP);
    check(mod_n, "switch off after stop");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #200;
    // interrupt edge for a range of addresses
    for (int k = 0; k < 40; k++) begin
      int exp_e;
      addr = (k < 10) ? 7'(k) : 7'($urandom);
      exp_e = (addr % 9) + 2;
      int_req = 1;
      #100;
      check(int'(int_index) == (addr % 9) + 1, "interrupt index");
      txn(1);
      check(seen[9:0] == 10'(1 << (exp_e - 1)),
            $sformatf("addr %0d: edges %b, expected edge %0d", addr, seen[9:0], exp_e));
      int_req = 0;
      #100;
      txn(1);
      check(seen == 0, "no modulation without an interrupt");
    end
    // full duplex
    for (int k = 0; k < 10; k++) begin
      logic [7:0] d;
      int s0;
      d = (k == 0) ? 8'h32 : 8'($urandom);
      @(negedge clk) begin fd_data = d; fd_arm = 1; end
      @(negedge clk) fd_arm = 0;
      @(negedge clk);
      check(fd_pending, "data queued");
      s0 = n_sent;
      txn(3);
      for (int b = 0; b < 8; b++)
        check(seen[18 + b] == d[7 - b], $sformatf("data bit %0d of %h", 7 - b, d));
      check(seen[17:0] == 0 && seen[63:26] == 0, "only data edges modulated");
      #100;
      check(n_sent == s0 + 1 && !fd_pending, "fd_sent after the transfer");
      txn(3);
      check(seen == 0, "data sent once");
    end
    // interrupt and data together
    addr = 7'h21; int_req = 1;
    @(negedge clk) begin fd_data = 8'hC3; fd_arm = 1; end
    @(negedge clk) fd_arm = 0;
    txn(3);
    check(seen[27:0] == ((28'hC3 << 18) | 28'(1 << 7)), $sformatf("combined %b", seen[27:0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
