// lvps_fpga_top: controller FPGA of the low-voltage regulators board.
//
// The board powers seven front-end boards through 23 radiation-tolerant
// linear regulators. This FPGA switches them through 24 inhibit outputs,
// measures the board's voltages, currents and temperatures through a
// multiplexed ADC, and does both on command from a remote control board
// over I2C. It runs from a local 40 MHz oscillator.
//
// Blocks: reset_sync conditions the reset pin; clk_divider makes the 10 MHz
// ADC clock and the LED blink; i2c_slave talks to the bus and holds reply
// bytes in its FIFO; cmd_controller decodes and executes the commands;
// delatch_ctrl restarts the ADC after its latch-up protection trips.
//
// Interface (plain pins): scl_i/sda_i/sda_drive_low/n_re to the I2C LVDS
// transceivers, i2c_addr from the address switches (the slave address is
// 1 followed by these six bits), adc_* to the ADC, mux_sel/mux_en_n to the
// analog switches, inhibit to the regulators (1 = off), adc_fault_n and
// adc_shdn to the ADC's protection switch, led to the status LED.
//
// The block partition and the pin list follow the document. The address
// format, clocks and pin functions are also taken from it. The internal
// reset also feeds an assertion in the I2C slave, which lint tools report
// as a net used both synchronously and asynchronously; it is intended.
module lvps_fpga_top
  import lvps_pkg::*;
#(
  parameter int unsigned SETTLE_TICKS = 200,
  parameter int unsigned FIFO_DEPTH   = 64,
  parameter int unsigned LED_DIV_BITS = 24,
  parameter int unsigned RETRY_DELAY  = 50
) (
  input  logic                 clk,
  input  logic                 rst_pin_n,
  // I2C through the LVDS transceivers
  input  logic                 scl_i,
  input  logic                 sda_i,
  output logic                 sda_drive_low,
  output logic                 n_re,
  input  logic [5:0]           i2c_addr,
  // ADC and analog switches
  output logic                 adc_clk,
  input  logic [ADC_W-1:0]     adc_data,
  input  logic                 adc_otr,
  output logic [MUX_SEL_W-1:0] mux_sel,
  output logic [MUX_EN_W-1:0]  mux_en_n,
  input  logic                 adc_fault_n,
  output logic                 adc_shdn,
  // regulators and status
  output logic [N_INHIBIT-1:0] inhibit,
  output logic                 led
);

  logic       rst_n;
  logic       rx_valid, tx_push, fifo_rst_n;
  logic [7:0] rx_data, tx_data;

  reset_sync u_reset (.clk, .rst_pin_n, .rst_n);

  clk_divider #(.WIDTH(LED_DIV_BITS)) u_div (
    .clk, .rst_n, .div4(adc_clk), .msb(led));

  i2c_slave #(.FIFO_DEPTH(FIFO_DEPTH)) u_i2c (
    .clk, .rst_n, .fifo_rst_n, .dev_addr({1'b1, i2c_addr}),
    .scl_i, .sda_i, .sda_drive_low, .n_re,
    .rx_valid, .rx_data, .tx_data, .tx_push);

  cmd_controller #(.SETTLE_TICKS(SETTLE_TICKS)) u_ctrl (
    .clk, .rst_n, .rx_valid, .rx_data, .tx_data, .tx_push, .fifo_rst_n,
    .adc_data, .adc_otr, .mux_sel, .mux_en_n, .inhibit);

  delatch_ctrl #(.RETRY_DELAY(RETRY_DELAY)) u_delatch (
    .clk, .rst_n, .fault_n(adc_fault_n), .shdn(adc_shdn));

endmodule
