// tb_i4c_system -- end-to-end test of the I4C controller and three targets.
//
// The digital top runs with all parameters at their defaults against an RC
// model of the bus (i2c_bus_model) and a behavioural I2C controller
// (i2c_master_model) that generates 100 kHz transactions. The testbench plays
// the host: it drains the measurement FIFOs on their interrupt, sets the bus
// capacitance to mimic devices joining and leaving, raises target interrupts
// and arms a full-duplex transfer. Expected values come from the RC formula
// (30%-70% rise = ln(7/3) * R * C) and from the pull-up state machine rules,
// worked out here independently of the RTL. Every mechanism of the design
// must occur at least once: pull-up step up, step down and hold, block
// (stuck bus), red zone, churn, interrupt decode, full-duplex decode,
// capacitance and resolution warnings, FIFO interrupt and FIFO overflow.
`timescale 1ns/1ps
module tb_i4c_system;
  import i4c_pkg::*;

  localparam int NT = 3;

  logic clk = 0, tgt_clk = 0, rst_n = 0;
  always #4 clk = ~clk;          // 125 MHz measurement clock
  always #5 tgt_clk = ~tgt_clk;  // 100 MHz target clock

  int checks = 0, failures = 0;

  // ---- bus ----
  logic m_scl_low, m_sda_low, stuck_low = 0, glitch = 0;
  int   c_pf = 30;
  logic scl_lo, scl_hi, sda_lo, sda_hi;
  rsel_t rsel;
  logic [NT-1:0] mod_n;

  i2c_master_model u_m (.scl_in(scl_hi), .scl_drive_low(m_scl_low),
                        .sda_drive_low(m_sda_low));

  i2c_bus_model #(.NUM_MOD(NT)) u_bus (
    .scl_drive_low (m_scl_low | stuck_low), .sda_drive_low (m_sda_low),
    .rsel, .mod_on (~mod_n), .c_pf, .glitch_scl (glitch),
    .scl_above_lo (scl_lo), .scl_above_hi (scl_hi),
    .sda_above_lo (sda_lo), .sda_above_hi (sda_hi)
  );

  // ---- DUT ----
  logic [1:0] fifo_pop = 0, fifo_irq_clr = 0;
  rt_event_t  fifo_data [2];
  logic [1:0] fifo_empty, fifo_irq, fifo_overflow, cap_warn, res_warn, pu_state;
  logic bus_stuck, red_zone, in_tx, cal_valid, int_valid, fd_valid, churn;
  rt_t  cal_rt;
  logic [N_INT_SRC-1:0] int_vec;
  logic [7:0] fd_byte;
  logic [6:0] tgt_addr [NT];
  logic [NT-1:0] tgt_int_req = 0, tgt_fd_arm = 0, tgt_fd_pending, tgt_fd_sent;
  logic [7:0] tgt_fd_data [NT];
  logic [3:0] tgt_int_index [NT];

  i4c_system dut (
    .clk, .rst_n,
    .scl_above_lo (scl_lo), .scl_above_hi (scl_hi),
    .sda_above_lo (sda_lo), .sda_above_hi (sda_hi),
    .rsel, .fifo_pop, .fifo_data, .fifo_empty, .fifo_irq, .fifo_irq_clr,
    .fifo_overflow, .cap_warn, .res_warn, .bus_stuck, .red_zone, .pu_state,
    .in_tx, .cal_valid, .cal_rt, .int_valid, .int_vec, .fd_valid, .fd_byte,
    .churn,
    .tgt_clk, .tgt_rst_n (rst_n), .tgt_scl (scl_hi), .tgt_sda (sda_hi),
    .tgt_addr, .tgt_int_req, .tgt_fd_arm, .tgt_fd_data,
    .tgt_mod_n (mod_n), .tgt_int_index, .tgt_fd_pending, .tgt_fd_sent
  );

  initial begin
    tgt_addr[0] = 7'h21;  // 33 mod 9 = 6 -> interrupt index 7
    tgt_addr[1] = 7'h14;  // 20 mod 9 = 2 -> interrupt index 3
    tgt_addr[2] = 7'h30;  // 48 mod 9 = 3 -> interrupt index 4
    for (int t = 0; t < NT; t++) tgt_fd_data[t] = '0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---- mechanism counters ----
  int n_up = 0, n_down = 0, n_hold = 0, n_block = 0, n_red = 0, n_churn = 0;
  int n_int = 0, n_fd = 0, n_cap = 0, n_res = 0, n_irq = 0, n_ovf = 0;
  logic [N_INT_SRC-1:0] last_int_vec;
  logic [7:0] last_fd;
  rt_t last_cal;
  int  cal_seen = 0;
  logic stuck_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (churn) n_churn++;
    if (int_valid) begin
      last_int_vec <= int_vec;
      if (int_vec != 0) begin
        n_int++;
        $display("interrupt vector %b at %0t", int_vec, $time);
      end
    end
    if (fd_valid) begin
      n_fd++;
      last_fd <= fd_byte;
    end
    if (cal_valid) begin
      last_cal <= cal_rt;
      cal_seen++;
    end
    if (|cap_warn) n_cap++;
    if (fifo_overflow[0] && !$past(fifo_overflow[0])) n_ovf++;
    if (|res_warn) n_res++;
    if (red_zone && !$past(red_zone)) n_red++;
    stuck_q <= bus_stuck;
    if (bus_stuck && !stuck_q) n_block++;
  end

  // ---- host: drain the FIFOs on their interrupt ----
  bit drain_en = 1;
  int popped [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    fifo_pop     <= '0;
    fifo_irq_clr <= '0;
    for (int l = 0; l < 2; l++) begin
      if (fifo_irq[l] && !fifo_irq_clr[l]) begin
        n_irq++;
        fifo_irq_clr[l] <= 1'b1;
      end
      if (drain_en && !fifo_empty[l] && !fifo_pop[l]) begin
        fifo_pop[l] <= 1'b1;
        popped[l]++;
      end
    end
  end

  // ---- reference model ----
  function automatic real rp_k(input int s);
    case (s)
      0: return 2.21;
      1: return 4.7;
      2: return 10.0;
      default: return 22.0;
    endcase
  endfunction
  function automatic int exp_cycles(input int s, input int c);
    return int'($ln(7.0 / 3.0) * rp_k(s) * real'(c) / 8.0);
  endfunction

  int ref_sel = 0;
  int ref_prev_sel = -1, ref_prev_rt = 0;

  // Run one transaction and check the calibration measurement, the pull-up
  // decision and the churn decision.
  task automatic txn(input int n, input logic [7:0] d0, input logic [7:0] d1,
                     input int exp_churn, input string tag);
    int e, ch0, cs0;
    e   = exp_cycles(ref_sel, c_pf);
    ch0 = n_churn;
    cs0 = cal_seen;
    u_m.transaction(7'h21, n, d0, d1);
    repeat (20) @(posedge clk);
    check(cal_seen == cs0 + 1, {tag, ": one calibration measurement"});
    check(int'(last_cal) >= e - 2 && int'(last_cal) <= e + 2,
          $sformatf("%s: cal rise %0d cycles, expected %0d", tag, last_cal, e));
    // pull-up FSM reference (Figure-4 rules), from the measured value
    if (int'(last_cal) > 125) begin
      if (ref_sel > 0) begin ref_sel--; n_down++; end
    end else if (int'(last_cal) < 56) begin
      if (ref_sel < 3) begin ref_sel++; n_up++; end
    end else n_hold++;
    check(int'(rsel) == ref_sel,
          $sformatf("%s: rsel %0d expected %0d", tag, rsel, ref_sel));
    if (exp_churn >= 0)
      check((n_churn - ch0) == exp_churn,
            $sformatf("%s: churn %0d expected %0d", tag, n_churn - ch0, exp_churn));
  endtask

  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);

    // A: 30 pF rises too fast at 2.21k, 4.7k and 10k: three steps up to 22k,
    // then hold.
    c_pf = 30;
    txn(0, 0, 0, 0, "A1");
    check(rsel == 2'd1, "A1: stepped to 4.7k");
    txn(0, 0, 0, 0, "A2");
    txn(0, 0, 0, 0, "A3");
    txn(0, 0, 0, 0, "A4");
    check(rsel == 2'd3 && pu_state == 2'd2, "A4: holds 22k in S2");

    // B: a device joins (+10 pF): churn on an unchanged resistor.
    c_pf = 40;
    txn(0, 0, 0, 1, "B1");
    txn(0, 0, 0, 0, "B2");

    // C: two targets signal interrupts on their own edges.
    tgt_int_req = 3'b011;
    repeat (100) @(posedge clk);
    txn(0, 0, 0, 0, "C1");
    check(last_int_vec == 9'b0_0100_0100,
          $sformatf("C1: interrupt vector %b", last_int_vec));
    tgt_int_req = 3'b000;
    repeat (100) @(posedge clk);
    txn(0, 0, 0, 0, "C2");
    check(last_int_vec == '0, "C2: no interrupts");

    // D: target 2 sends 0x32 full duplex in the third byte frame.
    tgt_fd_data[2] = 8'h32;
    tgt_fd_arm[2]  = 1'b1;
    repeat (3) @(posedge tgt_clk);
    tgt_fd_arm[2]  = 1'b0;
    begin
      int f0;
      f0 = n_fd;
      txn(2, 8'hA5, 8'h5A, 0, "D1");
      check(n_fd == f0 + 1, "D1: one full-duplex byte");
      check(last_fd == 8'h32, $sformatf("D1: full-duplex byte %h", last_fd));
      check(!tgt_fd_pending[2], "D1: target released its data");
    end
    txn(2, 8'hA5, 8'h5A, 0, "D2");
    check(last_fd == 8'h00, "D2: nothing sent after the transfer");

    // E: many devices join (300 pF): too slow -> three steps down to 2.21k.
    c_pf = 300;
    txn(0, 0, 0, 1, "E1");
    txn(0, 0, 0, 0, "E2");
    txn(0, 0, 0, 0, "E3");
    check(rsel == 2'd0, "E3: smallest resistor");
    txn(0, 0, 0, 0, "E4");
    txn(0, 0, 0, 0, "E5");
    check(pu_state == 2'd2, "E5: holds");

    // F: overload (700 pF) even at the smallest resistor: red zone.
    c_pf = 700;
    txn(0, 0, 0, 1, "F1");
    check(red_zone, "F1: red zone flagged");
    c_pf = 30;
    txn(0, 0, 0, 1, "F2");
    check(!red_zone, "F2: red zone cleared");

    // G: SCL stuck low for the bus timeout: Block forces the smallest resistor.
    check(rsel != 2'd0, "G: resistor above minimum before the stuck bus");
    stuck_low = 1'b1;
    wait (bus_stuck);
    repeat (3) @(posedge clk);
    check(rsel == 2'd0 && pu_state == 2'd0, "G: Block selects Rmin");
    stuck_low = 1'b0;
    ref_sel = 0;
    repeat (50) @(posedge clk);
    check(!bus_stuck, "G: stuck flag clears");
    txn(0, 0, 0, -1, "G1");

    // H: a voltage drop during a rise gives a capacitance warning.
    begin
      int c0;
      c0 = n_cap;
      fork
        begin
          repeat (4) @(posedge scl_lo);
          #30 glitch = 1'b1;
          #40 glitch = 1'b0;
        end
      join_none
      txn(0, 0, 0, 0, "H1");
      check(n_cap > c0, "H1: capacitance warning");
    end

    // I: no capacitance: the line rises faster than the clock resolves.
    c_pf = 0;
    begin
      int r0;
      r0 = n_res;
      u_m.transaction(7'h21, 1, 8'h00, 8'h00);
      u_m.transaction(7'h21, 1, 8'h00, 8'h00);
      repeat (20) @(posedge clk);
      check(n_res > r0, "I: resolution warning");
    end

    // J: host does not drain: the 8-entry FIFO overflows.
    c_pf = 100;
    drain_en = 0;
    u_m.transaction(7'h21, 0, 8'h00, 8'h00);
    repeat (20) @(posedge clk);
    check(fifo_overflow[0], "J: SCL FIFO overflow");
    repeat (5) @(posedge clk);
    drain_en = 1;
    repeat (50) @(posedge clk);

    // every mechanism must have happened
    check(n_up > 0,    $sformatf("step up x%0d", n_up));
    check(n_down > 0,  $sformatf("step down x%0d", n_down));
    check(n_hold > 0,  $sformatf("hold x%0d", n_hold));
    check(n_block > 0, $sformatf("block x%0d", n_block));
    check(n_red > 0,   $sformatf("red zone x%0d", n_red));
    check(n_churn > 0, $sformatf("churn x%0d", n_churn));
    check(n_int > 0,   $sformatf("interrupt x%0d", n_int));
    check(n_fd > 0,    $sformatf("full duplex x%0d", n_fd));
    check(n_cap > 0,   $sformatf("cap warning x%0d", n_cap));
    check(n_res > 0,   $sformatf("resolution warning x%0d", n_res));
    check(n_irq > 0,   $sformatf("FIFO interrupt x%0d", n_irq));
    check(n_ovf > 0,   $sformatf("FIFO overflow x%0d", n_ovf));
    $display("mechanisms: up=%0d down=%0d hold=%0d block=%0d red=%0d churn=%0d int=%0d fd=%0d cap=%0d res=%0d irq=%0d ovf=%0d popped=%0d/%0d",
             n_up, n_down, n_hold, n_block, n_red, n_churn, n_int, n_fd, n_cap,
             n_res, n_irq, n_ovf, popped[0], popped[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
