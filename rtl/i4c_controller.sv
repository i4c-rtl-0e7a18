// i4c_controller -- hardware side of an I4C bus controller.
//
// Inputs are the four comparator outputs of the measurement front end: for
// SCL and for SDA, one comparator at 0.3*Vdd and one at 0.7*Vdd. They are
// asynchronous and are synchronized here. For each line a rise_time_meter
// measures every rising edge in fast-clock cycles and pushes the result into
// an rt_fifo that the host drains when its half-full interrupt fires.
//
// On SCL the measurements are also used in hardware:
//   * i2c_bus_monitor numbers the SCL rising edges of each transaction;
//   * edge_decoder takes edge 1 as the calibration reference, decodes the
//     pending-interrupt vector from edges 2..10 and full-duplex bytes from
//     later data frames;
//   * pullup_ctrl picks one of four pull-up resistors from the calibration
//     rise time, keeping it inside [GMIN, GMAX]; its select drives both the
//     SCL and the SDA resistor multiplexers;
//   * stuck_bus_detector forces the smallest resistor when SCL or SDA has been
//     low for longer than TIMEOUT cycles;
//   * churn_detector flags a change of the calibration rise time between
//     consecutive transactions (a device joined or left).
// The I2C protocol engine, address resolution and service discovery run on
// the host and are not part of this block.
//
// Defaults follow the source where it gives numbers: a 125 MHz clock,
// GMAX = 1000 ns = 125 cycles, FIFO interrupt at half full. GMIN = 450 ns
// (56 cycles) is this design's choice: it keeps the rise time close to the
// maximum, and it is the largest lower bound that cannot make the FSM
// oscillate, since one resistor step (at most 10k/22k = 0.455) changes the
// rise time by at least that factor.
// The pull-up decision taken from a transaction's calibration edge is applied
// at that transaction's stop condition (a choice of this design), so every
// edge of one transaction is measured with the same resistor.
// Timing: comparator inputs reach the FSMs after two synchronizer cycles;
// rsel changes two cycles after the stop condition is seen.
module i4c_controller
  import i4c_pkg::*;
#(
  parameter int unsigned GMIN_CYC    = 56,
  parameter int unsigned GMAX_CYC    = 125,
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned TIMEOUT     = 3_125_000,
  parameter int unsigned MOD_SHIFT   = 2,
  parameter int unsigned CHURN_DELTA = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  // comparator front end, asynchronous
  input  logic       scl_above_lo,
  input  logic       scl_above_hi,
  input  logic       sda_above_lo,
  input  logic       sda_above_hi,
  // pull-up multiplexer select (shared by SCL and SDA)
  output rsel_t      rsel,
  // host access to the two measurement FIFOs, index 0 = SCL, 1 = SDA
  input  logic [1:0] fifo_pop,
  output rt_event_t  fifo_data [2],
  output logic [1:0] fifo_empty,
  output logic [1:0] fifo_irq,
  input  logic [1:0] fifo_irq_clr,
  output logic [1:0] fifo_overflow,
  // status and events
  output logic [1:0] cap_warn,       // pulse per line
  output logic [1:0] res_warn,       // pulse per line
  output logic       bus_stuck,      // Block input of the pull-up FSM
  output logic       red_zone,
  output logic [1:0] pu_state,
  output logic       in_tx,
  output logic       cal_valid,
  output rt_t        cal_rt,
  output logic       int_valid,
  output logic [N_INT_SRC-1:0] int_vec,
  output logic       fd_valid,
  output logic [7:0] fd_byte,
  output logic       churn
);

  logic [3:0] cmp_s;
  logic       scl_lo, scl_hi, sda_lo, sda_hi;

  sync2 #(.W(4), .RST_VAL(4'b1111)) u_sync (
    .clk, .rst_n,
    .d ({sda_above_hi, sda_above_lo, scl_above_hi, scl_above_lo}),
    .q (cmp_s)
  );
  assign {sda_hi, sda_lo, scl_hi, scl_lo} = cmp_s;

  // ---- per-line measurement and FIFO ----
  logic      ev_valid [2];
  rt_event_t ev       [2];
  logic [1:0] line_lo, line_hi;
  assign line_lo = {sda_lo, scl_lo};
  assign line_hi = {sda_hi, scl_hi};

  for (genvar l = 0; l < 2; l++) begin : g_line
    logic [$clog2(FIFO_DEPTH+1)-1:0] level_unused;
    logic                            full_unused;

    rise_time_meter u_meter (
      .clk, .rst_n,
      .above_lo       (line_lo[l]),
      .above_hi       (line_hi[l]),
      .ev_valid       (ev_valid[l]),
      .ev             (ev[l]),
      .cap_warn       (cap_warn[l]),
      .res_warn_pulse (res_warn[l])
    );

    rt_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .clear    (1'b0),
      .push     (ev_valid[l]),
      .wr_data  (ev[l]),
      .pop      (fifo_pop[l]),
      .rd_data  (fifo_data[l]),
      .empty    (fifo_empty[l]),
      .full     (full_unused),
      .level    (level_unused),
      .irq      (fifo_irq[l]),
      .irq_clr  (fifo_irq_clr[l]),
      .overflow (fifo_overflow[l])
    );
  end

  // ---- transaction tracking and decoding on SCL ----
  logic       start_p, stop_p, edge_p;
  logic [7:0] edge_idx;
  logic [3:0] frame, pos;

  i2c_bus_monitor u_mon (
    .clk, .rst_n,
    .scl (scl_hi), .sda (sda_hi),
    .in_tx, .start_p, .stop_p, .edge_p, .edge_idx, .frame, .pos
  );

  edge_decoder #(.MOD_SHIFT(MOD_SHIFT)) u_dec (
    .clk, .rst_n,
    .start_p, .edge_p, .edge_idx, .frame, .pos,
    .ev_valid (ev_valid[0]),
    .ev       (ev[0]),
    .cal_valid, .cal_rt, .int_valid, .int_vec, .fd_valid, .fd_byte
  );

  // ---- bus recovery and pull-up selection ----
  logic stuck_scl, stuck_sda, rsel_changed_unused;

  stuck_bus_detector #(.TIMEOUT(TIMEOUT)) u_stuck_scl (
    .clk, .rst_n, .line_low(!scl_lo), .stuck(stuck_scl)
  );
  stuck_bus_detector #(.TIMEOUT(TIMEOUT)) u_stuck_sda (
    .clk, .rst_n, .line_low(!sda_lo), .stuck(stuck_sda)
  );
  assign bus_stuck = stuck_scl | stuck_sda;

  // The resistor decision of a transaction is applied at its stop
  // condition, so that all edges of one transaction are measured with the
  // same pull-up and stay comparable with the calibration edge.
  logic cal_held;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cal_held <= 1'b0;
    else if (cal_valid) cal_held <= 1'b1;
    else if (stop_p)    cal_held <= 1'b0;
  end

  pullup_ctrl u_pu (
    .clk, .rst_n,
    .tx      (stop_p && cal_held),
    .trise   (cal_rt),
    .block   (bus_stuck),
    .gmin    (rt_t'(GMIN_CYC)),
    .gmax    (rt_t'(GMAX_CYC)),
    .rsel,
    .state_o (pu_state),
    .red_zone,
    .rsel_changed (rsel_changed_unused)
  );

  // ---- device churn ----
  rt_t last_rt_unused;
  churn_detector #(.DELTA(CHURN_DELTA)) u_churn (
    .clk, .rst_n,
    .cal_valid, .cal_rt, .rsel,
    .churn,
    .last_rt (last_rt_unused)
  );

endmodule
