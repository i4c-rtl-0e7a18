// edge_decoder -- reads interrupt flags and full-duplex data out of SCL rise
// times.
//
// An I4C target speeds up an SCL rising edge by switching an extra pull-up
// onto the line, so a modulated edge rises faster than the unmodulated
// calibration edge (edge 1) of the same transaction. For every SCL edge the
// decoder compares the measured rise time with that reference:
//   modulated  <=>  ref - rt > ref >> MOD_SHIFT
// (with the default MOD_SHIFT = 2, an edge at least 25 % faster).
//   * Edge 1: stored as the reference, reported on cal_valid/cal_rt (the
//     pull-up controller and the churn detector use it).
//   * Edges 2..10: bit (edge-2) of the pending-interrupt vector, one bit per
//     interrupt index 1..9; the vector is reported on int_valid at edge 10.
//   * Data positions 0..7 of byte frames FD_FIRST_FRAME and later: one
//     full-duplex bit each, most significant bit first; a byte is reported on
//     fd_valid at position 7 of its frame.
// An edge whose rise time was not measured (capacitance warning) reads as
// unmodulated. Without a reference (edge 1 not measured) nothing is reported
// for that transaction.
//
// The comparison against the first edge, the 2nd..10th edge interrupt
// assignment and MSB-first data on clock edges follow the source; the
// relative threshold and FD_FIRST_FRAME = 2 (the first data byte after the
// address byte and a command byte) are this design's choices.
// Timing: inputs come from rise_time_meter and i2c_bus_monitor, aligned so
// that ev_valid and edge_p of one edge fall in the same cycle; all outputs
// are registered one cycle later.
module edge_decoder
  import i4c_pkg::*;
#(
  parameter int unsigned MOD_SHIFT      = 2,
  parameter int unsigned FD_FIRST_FRAME = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_p,
  input  logic       edge_p,
  input  logic [7:0] edge_idx,
  input  logic [3:0] frame,
  input  logic [3:0] pos,
  input  logic       ev_valid,
  input  rt_event_t  ev,
  output logic       cal_valid,
  output rt_t        cal_rt,
  output logic       int_valid,
  output logic [N_INT_SRC-1:0] int_vec,
  output logic       fd_valid,
  output logic [7:0] fd_byte
);

  rt_t                  ref_rt;
  logic                 ref_ok;
  logic [N_INT_SRC-1:0] vec_acc;
  logic [6:0]           fd_acc;
  logic                 bit_mod;
  rt_t                  diff;

  always_comb begin
    diff    = ref_rt - ev.count;
    bit_mod = ev_valid && ref_ok && (ref_rt > ev.count) &&
              (diff > (ref_rt >> MOD_SHIFT));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_rt    <= '0;
      ref_ok    <= 1'b0;
      vec_acc   <= '0;
      fd_acc    <= '0;
      cal_valid <= 1'b0;
      cal_rt    <= '0;
      int_valid <= 1'b0;
      int_vec   <= '0;
      fd_valid  <= 1'b0;
      fd_byte   <= '0;
    end else begin
      cal_valid <= 1'b0;
      int_valid <= 1'b0;
      fd_valid  <= 1'b0;
      if (start_p) begin
        ref_ok  <= 1'b0;
        vec_acc <= '0;
      end else if (edge_p) begin
        if (edge_idx == 8'd1) begin
          ref_ok <= ev_valid;
          if (ev_valid) begin
            ref_rt    <= ev.count;
            cal_valid <= 1'b1;
            cal_rt    <= ev.count;
          end
        end else if (edge_idx <= 8'(N_INT_EDGES)) begin
          vec_acc[4'(edge_idx - 8'd2)] <= bit_mod;
          if (edge_idx == 8'(N_INT_EDGES) && ref_ok) begin
            int_valid <= 1'b1;
            int_vec   <= vec_acc;
            int_vec[N_INT_SRC-1] <= bit_mod;
          end
        end
        if (frame >= 4'(FD_FIRST_FRAME) && pos <= 4'd7 && ref_ok) begin
          fd_acc <= {fd_acc[5:0], bit_mod};
          if (pos == 4'd7) begin
            fd_valid <= 1'b1;
            fd_byte  <= {fd_acc, bit_mod};
          end
        end
      end
    end
  end

endmodule
