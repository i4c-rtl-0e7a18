// stuck_bus_detector -- flags a bus line held low for too long.
//
// Counts consecutive clock cycles in which the (synchronized) line is below
// the low threshold. When the count reaches TIMEOUT the line is declared
// stuck and `stuck` stays high until the line rises above the low threshold
// again. The controller feeds `stuck` to the Block input of the pull-up FSM,
// which then selects the smallest pull-up resistor to try to recover the bus.
//
// The source says only that a stuck-low bus is detected with a timeout; the
// default TIMEOUT of 25 ms (3,125,000 cycles at 125 MHz) is this design's
// choice, taken from the SMBus clock-low timeout.
// Timing: `stuck` rises on the clock edge at which the line has been low for
// TIMEOUT cycles and falls one cycle after the line is seen high.
module stuck_bus_detector #(
  parameter int unsigned TIMEOUT = 3_125_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic line_low,    // synchronized: line below 0.3*Vdd
  output logic stuck
);
  localparam int unsigned CW = $clog2(TIMEOUT + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      stuck <= 1'b0;
    end else if (!line_low) begin
      cnt   <= '0;
      stuck <= 1'b0;
    end else if (cnt != CW'(TIMEOUT)) begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(TIMEOUT - 1)) stuck <= 1'b1;
    end
  end
endmodule
