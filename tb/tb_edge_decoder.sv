// tb_edge_decoder -- checks interrupt-vector and full-duplex decoding.
//
// Feeds the decoder the aligned edge and measurement streams that the bus
// monitor and the rise-time meter produce. Each transaction gets a random
// reference rise time on edge 1, a random interrupt vector on edges 2..10 and
// random full-duplex bytes on the data edges of frames 2 and up; a modulated
// edge is given a rise time well below the reference, an unmodulated one a
// value near it. The decoded vector and bytes are compared with what was
// sent. Also checked: an edge without a measurement reads as 0, and without
// a reference nothing is reported.
`timescale 1ns/1ps
module tb_edge_decoder;
  import i4c_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic start_p = 0, edge_p = 0, ev_valid = 0;
  logic [7:0] edge_idx = 0;
  logic [3:0] frame = 0, pos = 0;
  rt_event_t ev = '0;
  logic cal_valid, int_valid, fd_valid;
  rt_t cal_rt;
  logic [N_INT_SRC-1:0] int_vec;
  logic [7:0] fd_byte;

  edge_decoder dut (.clk, .rst_n, .start_p, .edge_p, .edge_idx, .frame, .pos,
                    .ev_valid, .ev, .cal_valid, .cal_rt, .int_valid, .int_vec,
                    .fd_valid, .fd_byte);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [N_INT_SRC-1:0] got_vec;
  int n_int = 0, n_cal = 0;
  logic [7:0] got_fd[$];
  rt_t got_cal;
  always @(posedge clk) if (rst_n) begin
    if (int_valid) begin n_int++; got_vec = int_vec; end
    if (fd_valid) got_fd.push_back(fd_byte);
    if (cal_valid) begin n_cal++; got_cal = cal_rt; end
  end

  task automatic one_edge(input int e, input bit meas, input int rt);
    @(negedge clk);
    edge_p = 1; edge_idx = 8'(e); frame = 4'((e - 1) / 9); pos = 4'((e - 1) % 9);
    ev_valid = meas; ev.count = rt_t'(rt); ev.res_warn = 0;
    @(negedge clk);
    edge_p = 0; ev_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  // nbytes frames after the address; drop = edge without measurement (0: none)
  task automatic txn(input int nframes, input logic [N_INT_SRC-1:0] vec,
                     input logic [7:0] fd [4], input int drop, input bit meas_ref);
    int ref_rt, n0, e;
    logic [N_INT_SRC-1:0] expv;
    logic [7:0] expfd[$];
    ref_rt = $urandom_range(40, 1000);
    n0 = n_int;
    got_fd.delete();
    @(negedge clk) start_p = 1;
    @(negedge clk) start_p = 0;
    expv = vec;
    for (e = 1; e <= 9 * nframes + 1; e++) begin
      bit m;
      int f, p;
      f = (e - 1) / 9; p = (e - 1) % 9;
      m = 0;
      if (e >= 2 && e <= 10) m = vec[e - 2];
      if (f >= 2 && p <= 7 && f - 2 < 4) m = fd[f - 2][7 - p];
      if (e == drop) begin
        one_edge(e, 0, 0);
        if (e >= 2 && e <= 10) expv[e - 2] = 0;
        if (f >= 2 && p <= 7) m = 0;
      end else if (e == 1) one_edge(e, meas_ref, ref_rt);
      else one_edge(e, 1, m ? ref_rt / 2 - $urandom_range(0, ref_rt / 4)
                            : ref_rt + $urandom_range(0, 4) - 2);
      if (f >= 2 && p == 7) begin
        logic [7:0] b;
        b = fd[f - 2];
        if (drop >= 9 * f + 1 && drop <= 9 * f + 8) b[7 - (drop - 9 * f - 1)] = 0;
        expfd.push_back(b);
      end
    end
    repeat (3) @(negedge clk);
    if (meas_ref) begin
      check(got_cal == rt_t'(ref_rt), "calibration value reported");
      check(n_int == n0 + 1, "one interrupt vector per transaction");
      check(got_vec == expv, $sformatf("vector %b expected %b", got_vec, expv));
      check(got_fd.size() == expfd.size(), $sformatf("%0d bytes", got_fd.size()));
      for (int i = 0; i < expfd.size() && i < got_fd.size(); i++)
        check(got_fd[i] == expfd[i], $sformatf("byte %h expected %h", got_fd[i], expfd[i]));
    end else begin
      check(n_int == n0 && got_fd.size() == 0, "nothing reported without a reference");
    end
  endtask

  initial begin
    logic [7:0] fd [4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    fd = '{8'h32, 8'hA5, 8'h00, 8'hFF};
    txn(1, 9'b0_0000_0100, fd, 0, 1);   // single interrupt, edge 4
    txn(3, 9'b1_0000_0001, fd, 0, 1);   // edges 2 and 10, one data byte
    txn(5, 9'b1_1111_1111, fd, 0, 1);   // all interrupts, three bytes
    txn(3, 9'b0_0000_1000, fd, 5, 1);   // edge 5 not measured
    txn(3, 9'b0_0000_0000, fd, 22, 1);  // a data edge not measured
    txn(3, 9'b0_0010_0000, fd, 0, 0);   // no reference
    for (int k = 0; k < 60; k++) begin
      for (int i = 0; i < 4; i++) fd[i] = 8'($urandom);
      txn($urandom_range(1, 6), 9'($urandom), fd, 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
