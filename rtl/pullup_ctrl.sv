// pullup_ctrl -- chooses the bus pull-up resistor from measured rise times.
//
// The controller has four pull-up resistors per line behind a 4-channel
// analog multiplexer; `rsel` (the two multiplexer select pins, shared by the
// SCL and SDA multiplexers) picks one, 0 being the smallest resistance
// (2.21k, 4.7k, 10k, 22k). Once per transaction `tx` delivers the rise time
// of the unmodulated calibration edge, `trise`, in clock cycles. The FSM
// keeps that rise time inside the window [gmin, gmax]:
//   S0 (R = Rmin)           : entered on reset and whenever `block` is high
//                             (bus stuck low: pull up as hard as possible)
//   S1 (R = min(R+1, Rmax)) : entered on tx with trise < gmin (weaker pull-up,
//                             less power)
//   S2 (R unchanged)        : entered on tx with trise inside the window
//   S3 (R = max(R-1, Rmin)) : entered on tx with trise > gmax (stronger pull-up)
// Each qualifying tx, including one that stays in S1 or S3, moves R by one
// step. `block` wins over tx. `red_zone` is set when trise > gmax while R is
// already Rmin -- the bus is loaded beyond what the strongest pull-up can
// handle -- and cleared by the next tx whose rise time is not above gmax.
// `rsel_changed` pulses when the selection changes.
//
// States, conditions and actions follow the source state diagram; the
// red-zone flag implements the overload signalling the source asks for.
// Reading the S1 bound as the largest resistor and the encoding of rsel
// (0 = 2.21k ... 3 = 22k) are this design's choices.
// Timing: rsel, state and red_zone update on the clock edge after tx/block.
// The window assertion below is disabled while rst_n is low; that use of
// rst_n next to the asynchronous reset of the registers is what lint tools
// report as a reset used both ways. It is simulation-only checking and adds
// no logic.
module pullup_ctrl
  import i4c_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tx,          // calibration-edge rise time valid
  input  rt_t   trise,       // its rise time in clock cycles
  input  logic  block,       // bus stuck: force the smallest resistor
  input  rt_t   gmin,        // lower edge of the target rise-time window
  input  rt_t   gmax,        // upper edge of the target rise-time window
  output rsel_t rsel,        // multiplexer select, 0 = smallest resistor
  output logic  [1:0] state_o, // current FSM state S0..S3
  output logic  red_zone,
  output logic  rsel_changed
);

  typedef enum logic [1:0] {S0 = 2'd0, S1 = 2'd1, S2 = 2'd2, S3 = 2'd3} state_e;
  state_e state;

  assign state_o = state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S0;
      rsel         <= RSEL_MIN;
      red_zone     <= 1'b0;
      rsel_changed <= 1'b0;
    end else begin
      rsel_changed <= 1'b0;
      if (block) begin
        state <= S0;
        rsel  <= RSEL_MIN;
        if (rsel != RSEL_MIN) rsel_changed <= 1'b1;
      end else if (tx) begin
        if (trise > gmax) begin
          state    <= S3;
          red_zone <= (rsel == RSEL_MIN);
          if (rsel != RSEL_MIN) begin
            rsel         <= rsel - 1'b1;
            rsel_changed <= 1'b1;
          end
        end else if (trise < gmin) begin
          state    <= S1;
          red_zone <= 1'b0;
          if (rsel != RSEL_MAX) begin
            rsel         <= rsel + 1'b1;
            rsel_changed <= 1'b1;
          end
        end else begin
          state    <= S2;
          red_zone <= 1'b0;
        end
      end
    end
  end

  // A window with gmin above gmax can never be met.
  property p_window_ok;
    @(posedge clk) disable iff (!rst_n) tx |-> (gmin <= gmax);
  endproperty
  a_window_ok: assert property (p_window_ok)
    else $error("pullup_ctrl: gmin above gmax");

endmodule
