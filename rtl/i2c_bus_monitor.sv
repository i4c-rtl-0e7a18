// i2c_bus_monitor -- tracks I2C transactions and numbers their SCL edges.
//
// Watches the synchronized logic levels of SCL and SDA. A start condition
// (SDA falling while SCL is high, outside a transaction) opens a transaction
// and clears the edge count; a stop condition (SDA rising while SCL is high)
// closes it. Every SCL rising edge inside a transaction is numbered from 1:
// edge 1 is the calibration edge, edges 2..10 are the interrupt edges, and
// the edges fall into byte frames of nine (eight data bits and ACK). For the
// most recent edge the monitor gives its number `edge_idx`, its byte frame
// `frame` (0 = address byte) and its place in the frame `pos` (0..7 data,
// 8 = ACK).
//
// A repeated start is not treated as a new transaction: edge numbering
// continues, as it does in the target's modulation FSM, so both ends of the
// bus agree on edge numbers. Edge numbers and frames saturate.
// The start/stop rules are the standard I2C ones; numbering edges from the
// start condition follows the source's transaction timing diagram.
// Timing: all outputs are registered; edge_p and the new edge_idx/frame/pos
// appear one cycle after the cycle in which SCL is first seen high, the same
// cycle in which rise_time_meter reports that edge.
module i2c_bus_monitor (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl,        // synchronized SCL logic level
  input  logic       sda,        // synchronized SDA logic level
  output logic       in_tx,      // between start and stop
  output logic       start_p,    // start condition seen (one cycle)
  output logic       stop_p,     // stop condition seen (one cycle)
  output logic       edge_p,     // SCL rising edge inside a transaction
  output logic [7:0] edge_idx,   // number of the latest edge, 1-based
  output logic [3:0] frame,      // byte frame of the latest edge
  output logic [3:0] pos         // position in the frame, 0..8
);
  logic scl_q, sda_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_q    <= 1'b1;
      sda_q    <= 1'b1;
      in_tx    <= 1'b0;
      start_p  <= 1'b0;
      stop_p   <= 1'b0;
      edge_p   <= 1'b0;
      edge_idx <= '0;
      frame    <= '0;
      pos      <= '0;
    end else begin
      scl_q   <= scl;
      sda_q   <= sda;
      start_p <= 1'b0;
      stop_p  <= 1'b0;
      edge_p  <= 1'b0;
      if (scl && scl_q && sda_q && !sda && !in_tx) begin
        in_tx    <= 1'b1;
        start_p  <= 1'b1;
        edge_idx <= '0;
        frame    <= '0;
        pos      <= '0;
      end else if (scl && scl_q && !sda_q && sda && in_tx) begin
        in_tx  <= 1'b0;
        stop_p <= 1'b1;
      end else if (in_tx && scl && !scl_q) begin
        edge_p <= 1'b1;
        if (edge_idx != 8'hFF) edge_idx <= edge_idx + 1'b1;
        // The first edge lands on frame 0, position 0.
        if (edge_idx == '0) begin
          frame <= '0;
          pos   <= '0;
        end else if (pos == 4'd8) begin
          pos <= '0;
          if (frame != 4'hF) frame <= frame + 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end
  end
endmodule
