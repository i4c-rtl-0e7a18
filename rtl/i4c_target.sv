// i4c_target -- modulation logic of an I4C target device.
//
// Decides which SCL rising edges of the next transaction this target speeds
// up, and drives the gate of its modulation switch (`mod_n`, active low: a
// PMOS connects an extra pull-up resistor from Vdd to SCL while it is low).
//   * Interrupt: while `int_req` is high the target modulates one edge of
//     every transaction. Its interrupt index is addr mod 9 + 1 (1..9), and it
//     modulates edge index+1, i.e. one of edges 2..10; edge 1 is never
//     modulated because the controller uses it as reference.
//   * Full duplex: a pulse on `fd_arm` (given once the target has received the
//     full-duplex command) queues `fd_data`; in the next transaction it is
//     sent MSB first on the eight data edges of byte frame FD_FRAME (edges
//     9*FD_FRAME+1 .. 9*FD_FRAME+8), while the controller writes on SDA.
//     `fd_sent` pulses at the stop of that transaction.
// The pattern is built into the preload word of target_mod_fsm, which is
// reloaded while the bus is idle.
//
// The index formula, the reserved first edge and the MSB-first data on clock
// edges follow the source. The frame used for full-duplex data (default 2:
// after the address byte and a command byte), the active-low gate output and
// the fd_arm/fd_sent handshake are this design's choices.
// Inputs scl_in/sda_in are asynchronous bus levels and are synchronized here.
module i4c_target
  import i4c_pkg::*;
#(
  parameter int unsigned FD_FRAME = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl_in,
  input  logic       sda_in,
  input  logic [6:0] addr,
  input  logic       int_req,
  input  logic       fd_arm,
  input  logic [7:0] fd_data,
  output logic       mod_n,
  output logic [3:0] int_index,
  output logic       fd_pending,
  output logic       fd_sent
);
  localparam int unsigned SHIFT_W = EDGES_PER_FRAME * (FD_FRAME + 1);
  localparam int unsigned IW      = $clog2(SHIFT_W);

  logic [1:0]         bus_s;
  logic               modulate, tx_done, busy;
  logic [SHIFT_W-1:0] preload;
  logic [7:0]         fd_q;
  logic               fd_in_flight;

  sync2 #(.W(2), .RST_VAL(2'b11)) u_sync (
    .clk, .rst_n, .d({sda_in, scl_in}), .q(bus_s)
  );

  // Interrupt index 1..9 from the 7-bit address.
  assign int_index = 4'((32'(addr) % N_INT_SRC) + 1);

  // Preload bit p modulates edge p+1, so the interrupt edge (index+1) is bit
  // `int_index`; full-duplex bit b (MSB first) of frame FD_FRAME is edge
  // 9*FD_FRAME + b + 1, i.e. bit 9*FD_FRAME + b.
  always_comb begin
    preload = '0;
    if (int_req) preload[IW'(int_index)] = 1'b1;
    if (fd_pending)
      for (int b = 0; b < 8; b++)
        preload[EDGES_PER_FRAME*FD_FRAME + b] = fd_q[7-b];
  end

  target_mod_fsm #(.SHIFT_W(SHIFT_W)) u_fsm (
    .clk, .rst_n,
    .scl (bus_s[0]), .sda (bus_s[1]),
    .preload, .modulate, .tx_done, .busy
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fd_q         <= '0;
      fd_pending   <= 1'b0;
      fd_in_flight <= 1'b0;
      fd_sent      <= 1'b0;
    end else begin
      fd_sent <= 1'b0;
      if (busy && fd_pending) fd_in_flight <= 1'b1;
      if (tx_done && fd_in_flight) begin
        fd_pending   <= 1'b0;
        fd_in_flight <= 1'b0;
        fd_sent      <= 1'b1;
      end else if (fd_arm && !busy) begin
        fd_q       <= fd_data;
        fd_pending <= 1'b1;
      end
    end
  end

  assign mod_n = !modulate;

endmodule
