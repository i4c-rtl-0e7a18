// i2c_bus_model -- behavioural model of the analog I2C bus for simulation.
//
// Models SCL and SDA as RC nodes. A line driven low by any device falls to
// 0 V at once; a released line charges through its pull-up resistor toward
// Vdd with time constant tau = R * C:  v(t+1ns) = 1 - (1 - v) * exp(-1ns/tau).
// R is the pull-up chosen by the controller's multiplexer (2.21k, 4.7k, 10k or
// 22k) in parallel, on SCL only, with one 2.2k modulation resistor per target
// whose switch is on. C is the bus capacitance in pF, set by the testbench.
// Outputs are the four comparators of the controller's measurement front end
// (V >= 0.3 Vdd and V >= 0.7 Vdd) and the logic levels the devices read
// (V >= 0.7 Vdd). `glitch_scl` briefly discharges SCL to 0.1 Vdd, which is
// how a rise is interrupted by a voltage drop. Time unit: 1 ns.
`timescale 1ns/1ps
module i2c_bus_model #(
  parameter int unsigned NUM_MOD = 3
) (
  input  logic               scl_drive_low,
  input  logic               sda_drive_low,
  input  logic [1:0]         rsel,
  input  logic [NUM_MOD-1:0] mod_on,
  input  int                 c_pf,
  input  logic               glitch_scl,
  output logic               scl_above_lo,
  output logic               scl_above_hi,
  output logic               sda_above_lo,
  output logic               sda_above_hi
);
  real v_scl = 1.0;
  real v_sda = 1.0;

  function automatic real rp_kohm(input logic [1:0] s);
    case (s)
      2'd0:    return 2.21;
      2'd1:    return 4.7;
      2'd2:    return 10.0;
      default: return 22.0;
    endcase
  endfunction

  function automatic real r_scl();
    real g;
    g = 1.0 / rp_kohm(rsel);
    for (int i = 0; i < NUM_MOD; i++) if (mod_on[i]) g += 1.0 / 2.2;
    return 1.0 / g;
  endfunction

  function automatic real step(input real v, input real r_k);
    real tau;
    tau = r_k * real'(c_pf);            // kOhm * pF = ns
    if (tau < 0.01) return 1.0;
    return 1.0 - (1.0 - v) * $exp(-1.0 / tau);
  endfunction

  always begin
    #1;
    if (scl_drive_low)   v_scl = 0.0;
    else if (glitch_scl) v_scl = 0.1;
    else if (v_scl < 0.9999) v_scl = step(v_scl, r_scl());
    if (sda_drive_low)   v_sda = 0.0;
    else if (v_sda < 0.9999) v_sda = step(v_sda, rp_kohm(rsel));
    // Nothing moves while both lines are settled: sleep until a driver changes.
    if ((scl_drive_low ? v_scl == 0.0 : v_scl >= 0.9999) &&
        (sda_drive_low ? v_sda == 0.0 : v_sda >= 0.9999) && !glitch_scl)
      @(scl_drive_low or sda_drive_low or glitch_scl);
  end

  assign scl_above_lo = (v_scl >= 0.3);
  assign scl_above_hi = (v_scl >= 0.7);
  assign sda_above_lo = (v_sda >= 0.3);
  assign sda_above_hi = (v_sda >= 0.7);
endmodule
