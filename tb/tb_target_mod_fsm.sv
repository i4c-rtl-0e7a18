// tb_target_mod_fsm -- checks which SCL rising edges the target modulates.
//
// Bit-bangs I2C transactions of random length on SCL/SDA with a random
// preload pattern. At every SCL rising edge k of a transaction the modulation
// output must equal preload bit k-1 (0 once the pattern is used up); it must
// be off after the stop, and tx_done must pulse once per stop. A new preload
// is taken between transactions. SCL activity without a start condition must
// not cause modulation.
`timescale 1ns/1ps
module tb_target_mod_fsm;
  localparam int W = 27;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic scl = 1, sda = 1, modulate, tx_done, busy;
  logic [W-1:0] preload = '0;

  target_mod_fsm #(.SHIFT_W(W)) dut (.clk, .rst_n, .scl, .sda, .preload,
                                     .modulate, .tx_done, .busy);

  int checks = 0, failures = 0, n_done = 0, n_mod = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  always @(posedge clk) if (tx_done) n_done++;

  localparam int HP = 8;
  task automatic wait_cyc(input int n); repeat (n) @(negedge clk); endtask

  int edge_no;
  logic [W-1:0] pat;

  task automatic rise_check();
    edge_no++;
    scl = 1;
    wait_cyc(2);
    if (edge_no <= W) begin
      check(modulate == pat[edge_no - 1],
            $sformatf("edge %0d: modulate=%0b expected %0b", edge_no, modulate, pat[edge_no - 1]));
      if (modulate) n_mod++;
    end else check(!modulate, "no modulation past the pattern");
    wait_cyc(HP - 2);
  endtask

  task automatic txn(input int nbytes, input logic [W-1:0] p);
    int d0;
    pat = p;
    preload = p;
    wait_cyc(HP);
    edge_no = 0;
    d0 = n_done;
    sda = 0; wait_cyc(HP);          // start
    scl = 0; wait_cyc(HP / 2);
    for (int b = 0; b < nbytes; b++)
      for (int i = 0; i < 9; i++) begin
        sda = $urandom_range(0, 1); wait_cyc(HP / 2);
        rise_check();
        scl = 0; wait_cyc(HP / 2);
      end
    sda = 0; wait_cyc(HP / 2);
    rise_check();
    sda = 1; wait_cyc(4);           // stop
    check(!modulate, "modulation off after stop");
    check(n_done == d0 + 1, "tx_done once per stop");
    preload = '0;
    wait_cyc(HP);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_cyc(4);
    txn(1, 27'b0000_0000_0000_0000_0000_0000_100);   // edge 3
    txn(3, 27'b1010_0101_0000_0000_0000_0010_010);
    // SCL toggling with no start: no modulation
    preload = '1;
    for (int i = 0; i < 5; i++) begin
      scl = 0; wait_cyc(HP); scl = 1; wait_cyc(2);
      check(!modulate, "no modulation without a start");
      wait_cyc(HP);
    end
    preload = '0;
    for (int k = 0; k < 30; k++) txn($urandom_range(1, 5), W'({$urandom, 1'b0}));
    check(n_mod > 0, "some edges modulated");
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
