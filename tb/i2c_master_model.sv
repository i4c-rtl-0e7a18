// i2c_master_model -- behavioural I2C controller that generates bus traffic.
//
// Drives SCL and SDA through open-drain pull-downs (`*_drive_low`) at a bit
// rate set by QP, the quarter bit period in ns (2500 ns: 100 kHz standard
// mode). After releasing SCL it waits until the line reads high before
// timing the high phase, as a real controller does when the rise is slow.
// Tasks: start, stop, write_byte (8 bits MSB first plus an ACK clock with SDA
// released), and transaction (address byte plus a list of data bytes).
`timescale 1ns/1ps
module i2c_master_model #(
  parameter int unsigned QP = 2500
) (
  input  logic scl_in,
  output logic scl_drive_low,
  output logic sda_drive_low
);
  initial begin
    scl_drive_low = 1'b0;
    sda_drive_low = 1'b0;
  end

  task automatic clock_high();
    scl_drive_low = 1'b0;
    wait (scl_in);
    #(2 * QP);
    scl_drive_low = 1'b1;
    #(QP);
  endtask

  task automatic start();
    sda_drive_low = 1'b0;
    #(QP);
    wait (scl_in);
    #(QP);
    sda_drive_low = 1'b1;
    #(2 * QP);
    scl_drive_low = 1'b1;
    #(QP);
  endtask

  task automatic put_bit(input logic b);
    sda_drive_low = !b;
    #(QP);
    clock_high();
  endtask

  task automatic write_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) put_bit(b[i]);
    put_bit(1'b1);                      // ACK clock, SDA released
  endtask

  task automatic stop();
    sda_drive_low = 1'b1;
    #(QP);
    scl_drive_low = 1'b0;
    wait (scl_in);
    #(2 * QP);
    sda_drive_low = 1'b0;
    #(4 * QP);
  endtask

  // Address byte (7-bit address, write) followed by n data bytes.
  task automatic transaction(input logic [6:0] addr, input int n,
                             input logic [7:0] d0, input logic [7:0] d1);
    start();
    write_byte({addr, 1'b0});
    if (n > 0) write_byte(d0);
    if (n > 1) write_byte(d1);
    stop();
  endtask
endmodule
