// target_mod_fsm -- rise-time modulation state machine of an I4C target.
//
// The target speeds up chosen SCL rising edges by switching an extra pull-up
// onto SCL while `modulate` is high. Which edges is given by a shift
// register loaded from `preload` while the bus is idle: bit p of the
// register decides edge p+1 of the next transaction (bit 0 is the
// calibration edge and should be 0). The FSM follows the bus levels:
//   STOP      : modulation off, register reloaded; waits for an idle bus
//               (SCL = 1 and SDA = 1), then PRE_START
//   PRE_START : register reloaded; a start (SDA = 0 while SCL = 1) leads to
//               SCL_HIGH; SCL going low without a start leads back to STOP
//   SCL_HIGH  : SCL high, SDA high; SDA falling leads to PRE_STOP
//   PRE_STOP  : SCL high, SDA low -- a stop may follow; SDA rising ends the
//               transaction (STOP, modulation off, tx_done)
//   SCL_LOW   : SCL low; SCL rising leads to SCL_HIGH
// On every SCL falling edge (SCL_HIGH or PRE_STOP to SCL_LOW) the register
// shifts one place and its outgoing bit becomes `modulate` until the next
// falling edge, so it covers the SCL rising edge that follows.
//
// The five states, their conditions and the shift on SCL falling edges follow
// the source state diagram; reloading the register while idle (the source's
// host preloads it) and the tx_done pulse are this design's choices.
// Inputs must be synchronized to `clk`. Timing: `modulate` changes one clock
// after SCL is first seen low.
module target_mod_fsm #(
  parameter int unsigned SHIFT_W = 27
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               scl,
  input  logic               sda,
  input  logic [SHIFT_W-1:0] preload,
  output logic               modulate,
  output logic               tx_done,    // stop seen (one cycle)
  output logic               busy        // inside a transaction
);

  typedef enum logic [2:0] {
    S_STOP, S_PRE_START, S_SCL_HIGH, S_PRE_STOP, S_SCL_LOW
  } state_e;

  state_e             state;
  logic [SHIFT_W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_STOP;
      sr       <= '0;
      modulate <= 1'b0;
      tx_done  <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      unique case (state)
        S_STOP: begin
          modulate <= 1'b0;
          sr       <= preload;
          if (scl && sda) state <= S_PRE_START;
        end
        S_PRE_START: begin
          sr <= preload;
          if (!scl)      state <= S_STOP;
          else if (!sda) state <= S_SCL_HIGH;
        end
        S_SCL_HIGH: begin
          if (!scl) begin
            modulate <= sr[0];
            sr       <= sr >> 1;
            state    <= S_SCL_LOW;
          end else if (!sda) begin
            state <= S_PRE_STOP;
          end
        end
        S_PRE_STOP: begin
          if (!scl) begin
            modulate <= sr[0];
            sr       <= sr >> 1;
            state    <= S_SCL_LOW;
          end else if (sda) begin
            modulate <= 1'b0;
            tx_done  <= 1'b1;
            state    <= S_STOP;
          end
        end
        S_SCL_LOW: if (scl) state <= S_SCL_HIGH;
        default: state <= S_STOP;
      endcase
    end
  end

  assign busy = (state == S_SCL_HIGH) || (state == S_PRE_STOP) || (state == S_SCL_LOW);

endmodule
