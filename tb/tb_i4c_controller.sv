// tb_i4c_controller -- checks the controller against the RC bus model.
//
// The controller sees its comparator inputs from i2c_bus_model, traffic comes
// from i2c_master_model at 100 kHz, and the testbench itself plays the
// targets: it switches a 2.2k modulation resistor onto SCL for chosen edges.
// Checked against values computed here from the RC formula
// (30%-70% rise = ln(7/3) * R * C): every rise time the host reads from the
// SCL and SDA FIFOs (SDA edges and unmodulated SCL edges within 2 cycles of
// the formula, modulated SCL edges below 3/4 of it), the number of entries
// per transaction, the decoded interrupt vector and full-duplex byte, the
// pull-up steps and Block with a shortened bus timeout. The rise-time window
// is widened to [13, 125] cycles so that small capacitances stay put.
`timescale 1ns/1ps
module tb_i4c_controller;
  import i4c_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic m_scl_low, m_sda_low, stuck_low = 0, mod_on = 0;
  int   c_pf = 30;
  logic scl_lo, scl_hi, sda_lo, sda_hi;
  rsel_t rsel;

  i2c_master_model u_m (.scl_in(scl_hi), .scl_drive_low(m_scl_low),
                        .sda_drive_low(m_sda_low));
  i2c_bus_model #(.NUM_MOD(1)) u_bus (
    .scl_drive_low (m_scl_low | stuck_low), .sda_drive_low (m_sda_low),
    .rsel, .mod_on (mod_on), .c_pf, .glitch_scl (1'b0),
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

  i4c_controller #(.TIMEOUT(5000), .GMIN_CYC(13)) dut (
    .clk, .rst_n,
    .scl_above_lo (scl_lo), .scl_above_hi (scl_hi),
    .sda_above_lo (sda_lo), .sda_above_hi (sda_hi),
    .rsel, .fifo_pop, .fifo_data, .fifo_empty, .fifo_irq, .fifo_irq_clr,
    .fifo_overflow, .cap_warn, .res_warn, .bus_stuck, .red_zone, .pu_state,
    .in_tx, .cal_valid, .cal_rt, .int_valid, .int_vec, .fd_valid, .fd_byte,
    .churn
  );

  // ---- tb as target: modulate SCL edges listed in mod_mask ----
  logic [63:0] mod_mask = '0;
  initial begin
    forever begin
      int k;
      // start: SDA falls while SCL is high
      @(negedge sda_hi);
      if (!scl_hi) continue;
      k = 0;
      while (1) begin
        logic scl_q, sda_q;
        scl_q = scl_hi; sda_q = sda_hi;
        @(scl_hi or sda_hi);
        if (scl_hi && scl_q && sda_hi && !sda_q) break;   // stop
        if (scl_q && !scl_hi) begin                        // SCL falling edge
          k++;
          mod_on = (k <= 64) ? mod_mask[k - 1] : 1'b0;
        end
      end
      mod_on = 0;
    end
  end

  // ---- reference ----
  function automatic real rp_k(input int s);
    case (s)
      0: return 2.21;
      1: return 4.7;
      2: return 10.0;
      default: return 22.0;
    endcase
  endfunction
  function automatic int exp_cyc(input real r_k, input int c);
    return int'($ln(7.0 / 3.0) * r_k * real'(c) / 8.0);
  endfunction

  // ---- host: read every FIFO entry ----
  rt_event_t got [2][$];
  always @(posedge clk) if (rst_n) begin
    fifo_pop <= '0;
    fifo_irq_clr <= fifo_irq;
    for (int l = 0; l < 2; l++)
      if (!fifo_empty[l] && !fifo_pop[l]) begin
        fifo_pop[l] <= 1'b1;
        got[l].push_back(fifo_data[l]);
      end
  end

  logic [N_INT_SRC-1:0] last_vec;
  logic [7:0] last_fd;
  int n_int = 0, n_fd = 0, n_churn = 0;
  always @(posedge clk) if (rst_n) begin
    if (int_valid) begin n_int++; last_vec <= int_vec; end
    if (fd_valid) begin n_fd++; last_fd <= fd_byte; end
    if (churn) n_churn++;
  end

  // One transaction with nbytes data bytes and the given modulated edges;
  // the resistor in use is the one selected before the transaction.
  task automatic txn(input int nbytes, input logic [63:0] mask, input string tag);
    int sel, e_scl, e_sda, e_mod, n_edges, ni0;
    sel = int'(rsel);
    e_scl = exp_cyc(rp_k(sel), c_pf);
    e_mod = exp_cyc(1.0 / (1.0 / rp_k(sel) + 1.0 / 2.2), c_pf);
    mod_mask = mask;
    got[0].delete(); got[1].delete();
    ni0 = n_int;
    u_m.transaction(7'h2A, nbytes, 8'h96, 8'h69);
    repeat (30) @(posedge clk);
    n_edges = 9 * (nbytes + 1) + 1;
    check(got[0].size() == n_edges,
          $sformatf("%s: %0d SCL entries, expected %0d", tag, got[0].size(), n_edges));
    // the first SCL entry is the calibration edge, measured with `sel`
    for (int i = 0; i < got[0].size(); i++) begin
      int v = int'(got[0][i].count);
      if (mask[i])
        check(v < (3 * e_scl) / 4 && v >= e_mod - 2 && v <= e_mod + 2,
              $sformatf("%s: modulated SCL edge %0d = %0d, expected %0d", tag, i + 1, v, e_mod));
      else if (i == 0)
        check(v >= e_scl - 2 && v <= e_scl + 2,
              $sformatf("%s: calibration edge = %0d, expected %0d", tag, v, e_scl));
    end
    check(ni0 + 1 == n_int, {tag, ": one interrupt vector"});
    check(last_vec == mask[9:1], $sformatf("%s: vector %b", tag, last_vec));
  endtask

  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);

    c_pf = 30;
    txn(0, '0, "T1");
    check(rsel == 1, "T1: 30 pF at 2.21k is below the window: step up");
    // SDA entries: every SDA rise of T2 is measured with the 4.7k resistor
    txn(1, 64'b10_0000_0010, "T2");
    begin
      int e = exp_cyc(4.7, 30);
      check(got[1].size() > 0, "T2: SDA rises measured");
      foreach (got[1][i])
        check(int'(got[1][i].count) >= e - 2 && int'(got[1][i].count) <= e + 2,
              $sformatf("T2: SDA rise %0d expected %0d", got[1][i].count, e));
    end
    check(rsel == 1, "T2: hold");
    // interrupts on edges 2 and 10, plus full duplex 0x32 on edges 19..26
    txn(2, 64'h0000_0000_0130_0202, "T3");
    check(n_fd == 1 && last_fd == 8'h32, $sformatf("T3: full-duplex byte %h", last_fd));
    // device joins
    begin
      int ch0;
      ch0 = n_churn;
      c_pf = 45;
      txn(0, '0, "T4");
      check(n_churn == ch0 + 1, "T4: churn flagged");
    end
    c_pf = 300;
    txn(0, '0, "T5");
    check(rsel == 0, "T5: 300 pF at 4.7k is above the window: step down");
    txn(0, 64'b1000, "T6");
    // stuck SCL with a shortened timeout: Block
    c_pf = 20;
    txn(0, '0, "T7");
    check(rsel == 1, "T7: step up");
    stuck_low = 1;
    repeat (5100) @(posedge clk);
    check(bus_stuck && rsel == 0, "stuck bus: Block selects the smallest resistor");
    stuck_low = 0;
    repeat (100) @(posedge clk);
    check(!bus_stuck, "stuck flag cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
