// rt_fifo -- rise-time event FIFO between the meter and the host.
//
// A synchronous first-in first-out buffer of DEPTH entries of type
// rt_event_t. The writer (the rise-time meter) pushes one entry per measured
// edge; the host pops with `pop` and sees the oldest entry on `rd_data`
// whenever `empty` is low (show-ahead). When a push brings the fill level to
// THRESH the FIFO raises `irq`, which stays set until the host writes
// `irq_clr`, so the host is interrupted once per half-full buffer rather than
// once per edge. A push into a full FIFO is dropped and sets the sticky
// `overflow` flag (also cleared by `irq_clr`). `clear` empties the FIFO.
//
// The interrupt at half full comes from the source description; DEPTH = 8
// entries, the sticky interrupt and the overflow flag are this design's
// choices. Push and pop in the same cycle on a non-empty, non-full FIFO keep
// the level unchanged. Timing: rd_data and level update one cycle after a
// push or pop.
module rt_fifo
  import i4c_pkg::*;
#(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned THRESH = DEPTH / 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      push,
  input  rt_event_t wr_data,
  input  logic      pop,
  output rt_event_t rd_data,
  output logic      empty,
  output logic      full,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic      irq,
  input  logic      irq_clr,
  output logic      overflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  typedef logic [$clog2(DEPTH+1)-1:0] lvl_t;

  rt_event_t       mem [DEPTH];
  logic [AW-1:0]   wptr, rptr;
  logic            do_push, do_pop;
  lvl_t            next_level;

  assign empty   = (level == '0);
  assign full    = (level == lvl_t'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rd_data = mem[rptr];

  always_comb begin
    next_level = level;
    if (do_push && !do_pop) next_level = level + 1'b1;
    if (do_pop && !do_push) next_level = level - 1'b1;
  end

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      level    <= '0;
      irq      <= 1'b0;
      overflow <= 1'b0;
    end else if (clear) begin
      wptr     <= '0;
      rptr     <= '0;
      level    <= '0;
      irq      <= 1'b0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wptr <= incr(wptr);
      if (do_pop)  rptr <= incr(rptr);
      level <= next_level;
      if (irq_clr) begin
        irq      <= 1'b0;
        overflow <= 1'b0;
      end
      if (do_push && next_level == lvl_t'(THRESH)) irq <= 1'b1;
      if (push && !do_push) overflow <= 1'b1;
    end
  end

  initial begin
    assert (THRESH >= 1 && THRESH <= DEPTH)
      else $error("rt_fifo: THRESH must lie in 1..DEPTH");
  end

endmodule
