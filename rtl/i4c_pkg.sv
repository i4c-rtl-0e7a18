// i4c_pkg -- types and constants shared by the I4C controller and target.
//
// The I4C scheme measures the 30%-to-70% rise time of every rising edge on
// SCL and SDA with a fast clock, uses the first (calibration) SCL edge of
// each transaction to choose the bus pull-up resistor, and lets targets speed
// up chosen SCL edges to signal interrupts and send full-duplex data.
//
// Numbers that come from the source description: a 125 MHz measurement clock
// (8 ns period), four selectable pull-up resistors (2.21k, 4.7k, 10k, 22k),
// a 1000 ns maximum rise time, N = 10 interrupt-capable edges per transaction
// and a measurement FIFO interrupt at half full. Counter widths, the FIFO
// depth and the decode thresholds are this design's own choices.
package i4c_pkg;

  // Measurement clock period in ns (125 MHz fast clock).
  localparam int unsigned CLK_PERIOD_NS = 8;

  // Rise-time counter width: 16 bits cover 524 us at 8 ns per count.
  localparam int unsigned RT_W = 16;
  typedef logic [RT_W-1:0] rt_t;

  // Pull-up resistor choices, index 0 is the smallest resistance.
  localparam int unsigned NUM_RP = 4;
  typedef logic [1:0] rsel_t;
  localparam rsel_t RSEL_MIN = 2'd0;
  localparam rsel_t RSEL_MAX = 2'(NUM_RP - 1);

  // Edges 1..N_INT_EDGES of a transaction are reserved for calibration (edge 1)
  // and interrupts (edges 2..N).
  localparam int unsigned N_INT_EDGES = 10;
  localparam int unsigned N_INT_SRC   = N_INT_EDGES - 1;   // 9 interrupt indices

  // SCL rising edges per I2C byte frame: 8 data bits plus ACK.
  localparam int unsigned EDGES_PER_FRAME = 9;

  // One rise-time measurement as the meter reports it.
  typedef struct packed {
    logic res_warn;   // both thresholds crossed within one clock: below resolution
    rt_t  count;      // fast-clock cycles between the 30% and 70% crossings
  } rt_event_t;

  // Which bus line a measurement belongs to.
  typedef enum logic {LINE_SCL = 1'b0, LINE_SDA = 1'b1} line_e;

endpackage
