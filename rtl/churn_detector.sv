// churn_detector -- notices devices joining or leaving the bus.
//
// A device added to or removed from the bus changes the bus capacitance and
// with it the rise time of the unmodulated calibration edge. On every
// calibration measurement (cal_valid) the detector compares the new rise time
// with the one of the previous transaction; if both were taken with the same
// pull-up resistor and they differ by more than DELTA clock cycles it pulses
// `churn`, which tells the host to run address resolution and service
// discovery. A measurement taken with a different resistor than the previous
// one only replaces the stored value, so pull-up changes are not mistaken for
// churn.
//
// Comparing the first SCL edge of consecutive transactions follows the
// source; the source calls the threshold empirical, and DELTA = 1 cycle
// (8 ns) and the same-resistor rule are this design's choices.
// Timing: `churn` is registered, one cycle after cal_valid.
module churn_detector
  import i4c_pkg::*;
#(
  parameter int unsigned DELTA = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cal_valid,
  input  rt_t   cal_rt,
  input  rsel_t rsel,        // pull-up selection during this measurement
  output logic  churn,
  output rt_t   last_rt
);
  logic  have_last;
  rsel_t last_rsel;
  rt_t   absdiff;

  assign absdiff = (cal_rt > last_rt) ? cal_rt - last_rt : last_rt - cal_rt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_last <= 1'b0;
      last_rsel <= '0;
      last_rt   <= '0;
      churn     <= 1'b0;
    end else begin
      churn <= 1'b0;
      if (cal_valid) begin
        if (have_last && rsel == last_rsel && absdiff > rt_t'(DELTA))
          churn <= 1'b1;
        have_last <= 1'b1;
        last_rsel <= rsel;
        last_rt   <= cal_rt;
      end
    end
  end
endmodule
