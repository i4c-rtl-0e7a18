// tb_workloads -- the two bus experiments of the design's evaluation, run on
// the full system with nine targets.
//
// 1. Dynamism sweep and measurement accuracy: the number of devices on the bus goes from 1 to 17, one
//    at a time. Each device adds capacitance; the bus model uses
//    C(n) = 90 pF + 15 pF * n, a load chosen so that, as on the reference
//    bench, one device is served by the 10k pull-up, the 2nd device forces
//    4.7k and the 11th forces 2.21k. After each change the host runs four
//    transactions. The testbench checks that the controller (a) reports churn
//    on the first transaction after every change, (b) ends on the largest
//    resistor whose 30%-70% rise time, ln(7/3) * R * C, stays within the
//    1000 ns limit of standard-mode I2C, and (c) then measures a rise time
//    between the lower window bound (450 ns) and 1000 ns. Every SCL rise
//    time the host pops on the way must match ln(7/3) * R * C within two
//    counts, for each resistor the sweep passes through.
// 2. Interrupts from nine sources: targets at addresses 0x12..0x1A map to
//    interrupt indices 1..9 (addr mod 9 + 1). For a series of random sets of
//    requesting targets the decoded vector must equal the set, and it must be
//    known within the first ten SCL rising edges of one transaction. The
//    latency is printed next to what polling nine devices over I2C costs
//    (27 bits per device).
`timescale 1ns/1ps
module tb_workloads;
  import i4c_pkg::*;

  localparam int NT = 9;

  logic clk = 0, tgt_clk = 0, rst_n = 0;
  always #4 clk = ~clk;          // 125 MHz measurement clock
  always #5 tgt_clk = ~tgt_clk;  // 100 MHz target clock

  int checks = 0, failures = 0;

  logic m_scl_low, m_sda_low;
  int   c_pf = 105;
  logic scl_lo, scl_hi, sda_lo, sda_hi;
  rsel_t rsel;
  logic [NT-1:0] mod_n;

  i2c_master_model u_m (.scl_in(scl_hi), .scl_drive_low(m_scl_low),
                        .sda_drive_low(m_sda_low));

  i2c_bus_model #(.NUM_MOD(NT)) u_bus (
    .scl_drive_low (m_scl_low), .sda_drive_low (m_sda_low),
    .rsel, .mod_on (~mod_n), .c_pf, .glitch_scl (1'b0),
    .scl_above_lo (scl_lo), .scl_above_hi (scl_hi),
    .sda_above_lo (sda_lo), .sda_above_hi (sda_hi)
  );

  logic [1:0] fifo_pop = 0, fifo_irq_clr = 0;
  rt_event_t  fifo_data [2];
  logic [1:0] fifo_empty, fifo_irq, fifo_overflow, cap_warn, res_warn, pu_state;
  logic bus_stuck, red_zone, in_tx, cal_valid, int_valid, fd_valid, churn;
  rt_t  cal_rt;
  logic [N_INT_SRC-1:0] int_vec;
  logic [7:0] fd_byte;
  logic [6:0] tgt_addr [NT];
  logic [NT-1:0] tgt_int_req = 0, tgt_fd_pending, tgt_fd_sent;
  logic [7:0] tgt_fd_data [NT];
  logic [3:0] tgt_int_index [NT];

  i4c_system #(.NUM_TARGETS(NT)) dut (
    .clk, .rst_n,
    .scl_above_lo (scl_lo), .scl_above_hi (scl_hi),
    .sda_above_lo (sda_lo), .sda_above_hi (sda_hi),
    .rsel, .fifo_pop, .fifo_data, .fifo_empty, .fifo_irq, .fifo_irq_clr,
    .fifo_overflow, .cap_warn, .res_warn, .bus_stuck, .red_zone, .pu_state,
    .in_tx, .cal_valid, .cal_rt, .int_valid, .int_vec, .fd_valid, .fd_byte,
    .churn,
    .tgt_clk, .tgt_rst_n (rst_n), .tgt_scl (scl_hi), .tgt_sda (sda_hi),
    .tgt_addr, .tgt_int_req, .tgt_fd_arm ('0), .tgt_fd_data,
    .tgt_mod_n (mod_n), .tgt_int_index, .tgt_fd_pending, .tgt_fd_sent
  );

  initial
    for (int t = 0; t < NT; t++) begin
      tgt_addr[t]    = 7'(8'h12 + t);  // (18 + t) mod 9 = t -> index t + 1
      tgt_fd_data[t] = '0;
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // host: keep the measurement FIFOs drained
  always @(posedge clk) if (rst_n) begin
    fifo_pop     <= ~fifo_empty & ~fifo_pop;
    fifo_irq_clr <= fifo_irq;
  end

  int n_churn = 0;
  rt_t last_cal;
  logic [N_INT_SRC-1:0] last_vec;
  time t_start, t_int;
  always @(posedge clk) if (rst_n) begin
    if (churn) n_churn++;
    if (cal_valid) last_cal <= cal_rt;
    if (int_valid) begin
      last_vec <= int_vec;
      t_int    <= $time;
    end
  end
  always @(posedge in_tx) t_start = $time;

  function automatic real rp_k(input int s);
    case (s)
      0: return 2.21;
      1: return 4.7;
      2: return 10.0;
      default: return 22.0;
    endcase
  endfunction
  // largest pull-up whose 30%-70% rise time meets the 1000 ns limit
  function automatic int best_sel(input int c);
    int b = 0;
    for (int s = 0; s < 4; s++)
      if ($ln(7.0 / 3.0) * rp_k(s) * real'(c) <= 1000.0) b = s;
    return b;
  endfunction

  int sel_of_n [18];

  // Measurement accuracy: during the sweep no target modulates, so every SCL
  // result the host pops must match the RC formula for the resistor and load
  // in use (within 2 counts: synchronizer phase and the model's 1 ns step).
  bit acc_on = 0;
  int acc_n [4] = '{0, 0, 0, 0};
  int acc_err_max = 0;
  always @(posedge clk) if (rst_n && acc_on && fifo_pop[0]) begin
    int e, m;
    e = int'($ln(7.0 / 3.0) * rp_k(int'(rsel)) * real'(c_pf) / 8.0);
    m = int'(fifo_data[0].count);
    check(m >= e - 2 && m <= e + 2 && !fifo_data[0].res_warn,
          $sformatf("SCL rise %0d counts at %0d pF, R index %0d, expected %0d", m, c_pf, rsel, e));
    acc_n[rsel]++;
    if ((m > e ? m - e : e - m) > acc_err_max) acc_err_max = (m > e ? m - e : e - m);
  end

  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);

    // ---- 1: dynamism sweep, 1 to 17 devices ----
    acc_on = 1;
    for (int n = 1; n <= 17; n++) begin
      int ch0, ch1;
      c_pf = 90 + 15 * n;
      ch0  = n_churn;
      u_m.transaction(7'h12, 0, 8'h00, 8'h00);
      repeat (20) @(posedge clk);
      ch1 = n_churn;
      if (n > 1)
        check(ch1 - ch0 == 1, $sformatf("n=%0d: churn on the first transaction", n));
      repeat (3) begin
        u_m.transaction(7'h12, 0, 8'h00, 8'h00);
        repeat (20) @(posedge clk);
      end
      check(n_churn == ch1, $sformatf("n=%0d: no churn once settled", n));
      sel_of_n[n] = int'(rsel);
      check(int'(rsel) == best_sel(c_pf),
            $sformatf("n=%0d (%0d pF): rsel %0d, expected %0d", n, c_pf, rsel, best_sel(c_pf)));
      check(pu_state == 2'd2, $sformatf("n=%0d: pull-up FSM holds", n));
      check(int'(last_cal) * 8 >= 450 && int'(last_cal) * 8 <= 1008,
            $sformatf("n=%0d: settled rise time %0d ns", n, int'(last_cal) * 8));
      check(!red_zone, $sformatf("n=%0d: no red zone", n));
      $display("devices %2d  C %3d pF  pull-up %5.2fk  rise %4d ns",
               n, c_pf, rp_k(int'(rsel)), int'(last_cal) * 8);
    end
    check(sel_of_n[1] == 2 && sel_of_n[2] == 1 && sel_of_n[10] == 1 && sel_of_n[11] == 0,
          "switch points: 10k for one device, 4.7k from the 2nd, 2.21k from the 11th");
    acc_on = 0;
    repeat (5) @(posedge clk);
    for (int r = 0; r < 3; r++)
      check(acc_n[r] > 20, $sformatf("measurements with resistor index %0d: %0d", r, acc_n[r]));
    $display("accuracy: %0d/%0d/%0d SCL edges measured at 2.21k/4.7k/10k, worst error %0d counts (%0d ns)",
             acc_n[0], acc_n[1], acc_n[2], acc_err_max, 8 * acc_err_max);

    // ---- 2: interrupts from nine targets ----
    c_pf = 90 + 15 * 9;
    repeat (4) begin
      u_m.transaction(7'h12, 0, 8'h00, 8'h00);
      repeat (20) @(posedge clk);
    end
    for (int t = 0; t < NT; t++)
      check(int'(tgt_int_index[t]) == t + 1, $sformatf("target %0d index", t));
    for (int k = 0; k < 14; k++) begin
      logic [NT-1:0] req;
      case (k)
        0:       req = '1;
        1:       req = 9'b1_0000_0000;
        2:       req = 9'b0_0000_0001;
        default: req = NT'($urandom);
      endcase
      tgt_int_req = req;
      repeat (50) @(posedge clk);
      u_m.transaction(7'h12, 0, 8'h00, 8'h00);
      repeat (20) @(posedge clk);
      check(last_vec == req, $sformatf("interrupt vector %b, expected %b", last_vec, req));
      // edge 10 comes one bit period (10 us at 100 kHz) after edge 9, plus
      // the start condition: 11 bit periods after the start, each stretched
      // by the time SCL needs to charge from 0 to 0.7 Vdd, ln(1/0.3) * R * C
      check(real'(t_int - t_start) <= 110_000.0 + 10.0 * $ln(1.0 / 0.3) * rp_k(int'(rsel)) * real'(c_pf),
            $sformatf("interrupt known after %0d ns", t_int - t_start));
      if (k == 0)
        $display("interrupt sources known %0d ns after the start (one transaction); polling 9 devices costs 9 x 27 bit periods = %0d ns",
                 t_int - t_start, 9 * 27 * 10_000);
      tgt_int_req = '0;
      repeat (50) @(posedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
