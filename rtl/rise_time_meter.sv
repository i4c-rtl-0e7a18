// rise_time_meter -- measures the 30%-to-70% rise time of one bus line.
//
// Two comparators watch the line: `above_lo` is high when V >= 0.3*Vdd and
// `above_hi` when V >= 0.7*Vdd. Both must already be synchronized to `clk`.
// A four-state FSM follows the line:
//   RESET : wait for the line to go below the low threshold
//   LOW   : line is low; when it passes the low threshold start counting
//           (count := 0, go to RISE); if it passes both thresholds in the
//           same cycle, report a resolution warning and go to HIGH
//   RISE  : count one per clock; on the high threshold go to HIGH; if the
//           line falls back below the low threshold during the rise, report
//           a capacitance warning and go back to RESET without a result
//   HIGH  : present the result for one cycle (ev_valid), then RESET
// The count includes the cycle in which the high threshold is seen, so a
// line whose synchronized comparators rise D cycles apart reports D. The
// rise time in ns is count * clock period (8 ns at 125 MHz). The counter
// saturates at its maximum value.
//
// The states, their transitions and the two warnings follow the source
// state diagram; the FIFO push of the diagram is done by rt_fifo, fed from
// ev_valid/ev. Counting on the exit cycle and saturation are this design's
// choices.
//
// Timing: ev_valid is a one-cycle pulse, one cycle after the cycle in which
// `above_hi` is first seen high. cap_warn and res_warn_pulse are one-cycle
// pulses.
module rise_time_meter
  import i4c_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      above_lo,       // synchronized V >= 0.3*Vdd comparator
  input  logic      above_hi,       // synchronized V >= 0.7*Vdd comparator
  output logic      ev_valid,       // one measurement ready (state HIGH)
  output rt_event_t ev,             // the measurement
  output logic      cap_warn,       // line dropped during a rise
  output logic      res_warn_pulse  // rise faster than one clock
);

  typedef enum logic [1:0] {S_RESET, S_LOW, S_RISE, S_HIGH} state_e;

  state_e state;
  rt_t    count;
  logic   res_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_RESET;
      count          <= '0;
      res_flag       <= 1'b0;
      cap_warn       <= 1'b0;
      res_warn_pulse <= 1'b0;
    end else begin
      cap_warn       <= 1'b0;
      res_warn_pulse <= 1'b0;
      unique case (state)
        S_RESET: if (!above_lo) state <= S_LOW;
        S_LOW: begin
          if (above_hi) begin
            state          <= S_HIGH;
            count          <= '0;
            res_flag       <= 1'b1;
            res_warn_pulse <= 1'b1;
          end else if (above_lo) begin
            state    <= S_RISE;
            count    <= '0;
            res_flag <= 1'b0;
          end
        end
        S_RISE: begin
          if (!above_lo) begin
            state    <= S_RESET;
            cap_warn <= 1'b1;
          end else begin
            if (count != '1) count <= count + 1'b1;
            if (above_hi) state <= S_HIGH;
          end
        end
        S_HIGH: state <= S_RESET;
        default: state <= S_RESET;
      endcase
    end
  end

  assign ev_valid    = (state == S_HIGH);
  assign ev.count    = count;
  assign ev.res_warn = res_flag;

endmodule
