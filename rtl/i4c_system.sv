// i4c_system -- an I4C controller and a group of I4C targets on one bus.
//
// I4C extends I2C without extra wires: the controller measures the rise time
// of every SCL and SDA edge, retunes the bus pull-up resistor from those
// measurements, and reads interrupt flags and full-duplex data that targets
// encode by speeding up chosen SCL edges. This top holds the digital logic of
// one controller (i4c_controller) and NUM_TARGETS targets (i4c_target). The
// bus itself is analog and stays outside: the controller's comparator inputs
// and resistor select, each target's view of SCL/SDA and its modulation gate
// output are ports, to be connected to the comparators, the resistor
// multiplexers and the modulation switches of a board, or to a bus model in
// simulation. The I2C protocol engines and the host software (address
// resolution, service discovery, command handling) are outside as well.
//
// The controller runs on `clk` (125 MHz measurement clock); the targets share
// a separate clock `tgt_clk`, since each target is its own device.
// NUM_TARGETS = 3 matches the sensor, storage and radio devices of the source's
// end-to-end example; other parameters are passed to the controller.
module i4c_system
  import i4c_pkg::*;
#(
  parameter int unsigned NUM_TARGETS = 3,
  parameter int unsigned GMIN_CYC    = 56,
  parameter int unsigned GMAX_CYC    = 125,
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned TIMEOUT     = 3_125_000,
  parameter int unsigned MOD_SHIFT   = 2,
  parameter int unsigned CHURN_DELTA = 1,
  parameter int unsigned FD_FRAME    = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // controller comparator front end (asynchronous)
  input  logic       scl_above_lo,
  input  logic       scl_above_hi,
  input  logic       sda_above_lo,
  input  logic       sda_above_hi,
  // controller pull-up multiplexer select
  output rsel_t      rsel,
  // controller host interface
  input  logic [1:0] fifo_pop,
  output rt_event_t  fifo_data [2],
  output logic [1:0] fifo_empty,
  output logic [1:0] fifo_irq,
  input  logic [1:0] fifo_irq_clr,
  output logic [1:0] fifo_overflow,
  output logic [1:0] cap_warn,
  output logic [1:0] res_warn,
  output logic       bus_stuck,
  output logic       red_zone,
  output logic [1:0] pu_state,
  output logic       in_tx,
  output logic       cal_valid,
  output rt_t        cal_rt,
  output logic       int_valid,
  output logic [N_INT_SRC-1:0] int_vec,
  output logic       fd_valid,
  output logic [7:0] fd_byte,
  output logic       churn,
  // targets
  input  logic       tgt_clk,
  input  logic       tgt_rst_n,
  input  logic       tgt_scl,                 // SCL level seen by the targets
  input  logic       tgt_sda,                 // SDA level seen by the targets
  input  logic [6:0] tgt_addr    [NUM_TARGETS],
  input  logic [NUM_TARGETS-1:0] tgt_int_req,
  input  logic [NUM_TARGETS-1:0] tgt_fd_arm,
  input  logic [7:0] tgt_fd_data [NUM_TARGETS],
  output logic [NUM_TARGETS-1:0] tgt_mod_n,   // modulation switch gates
  output logic [3:0] tgt_int_index [NUM_TARGETS],
  output logic [NUM_TARGETS-1:0] tgt_fd_pending,
  output logic [NUM_TARGETS-1:0] tgt_fd_sent
);

  i4c_controller #(
    .GMIN_CYC (GMIN_CYC), .GMAX_CYC (GMAX_CYC), .FIFO_DEPTH (FIFO_DEPTH),
    .TIMEOUT (TIMEOUT), .MOD_SHIFT (MOD_SHIFT), .CHURN_DELTA (CHURN_DELTA)
  ) u_ctrl (
    .clk, .rst_n,
    .scl_above_lo, .scl_above_hi, .sda_above_lo, .sda_above_hi,
    .rsel, .fifo_pop, .fifo_data, .fifo_empty, .fifo_irq, .fifo_irq_clr,
    .fifo_overflow, .cap_warn, .res_warn, .bus_stuck, .red_zone, .pu_state,
    .in_tx, .cal_valid, .cal_rt, .int_valid, .int_vec, .fd_valid, .fd_byte,
    .churn
  );

  for (genvar t = 0; t < NUM_TARGETS; t++) begin : g_tgt
    i4c_target #(.FD_FRAME(FD_FRAME)) u_tgt (
      .clk        (tgt_clk),
      .rst_n      (tgt_rst_n),
      .scl_in     (tgt_scl),
      .sda_in     (tgt_sda),
      .addr       (tgt_addr[t]),
      .int_req    (tgt_int_req[t]),
      .fd_arm     (tgt_fd_arm[t]),
      .fd_data    (tgt_fd_data[t]),
      .mod_n      (tgt_mod_n[t]),
      .int_index  (tgt_int_index[t]),
      .fd_pending (tgt_fd_pending[t]),
      .fd_sent    (tgt_fd_sent[t])
    );
  end

endmodule
