// sync2 -- two-flop synchronizer for asynchronous comparator and bus inputs.
//
// Each bit of `d` passes through two flip-flops clocked by `clk`, giving a
// two-cycle latency. The reset value is a parameter so that lines that idle
// high (I2C SCL/SDA) start out high. Helper of this design, not described in
// the source document.
module sync2 #(
  parameter int unsigned W = 1,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
