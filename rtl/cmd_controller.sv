// cmd_controller: the command state machines of the regulators board.
//
// Connects the main machine (decode and execute), the ID machine, the
// read-channel machine and the send machine. Bytes written by the I2C
// master arrive on rx_valid/rx_data; reply bytes leave on tx_push/tx_data
// for the slave's FIFO. The block drives the 24 regulator inhibit outputs
// and the analog multiplexer pins, and reads the ADC.
//
// Command set (one byte, written to the board's I2C address):
//   0xFA  ID: 32 bytes are queued, the ID text and a NUL
//   0xFB  all regulators on        0xFC  all regulators off
//   0xFD  regulators of the first front-end board on, the rest off
//   0xFE  read channel: the next byte is the channel; two bytes are queued
// The master fetches queued bytes with an I2C read.
//
// The partition into these machines follows the document.
module cmd_controller
  import lvps_pkg::*;
#(
  parameter int unsigned SETTLE_TICKS = 200
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rx_valid,
  input  logic [7:0]           rx_data,
  output logic [7:0]           tx_data,
  output logic                 tx_push,
  output logic                 fifo_rst_n,
  input  logic [ADC_W-1:0]     adc_data,
  input  logic                 adc_otr,
  output logic [MUX_SEL_W-1:0] mux_sel,
  output logic [MUX_EN_W-1:0]  mux_en_n,
  output logic [N_INHIBIT-1:0] inhibit
);

  logic       ask_id, ask_read, send_data, send_req_id, send_req_read;
  logic [5:0] bytes_sent;
  logic [ADC_W-1:0] sample;

  main_fsm u_main (
    .clk, .rst_n, .rx_valid, .rx_data, .bytes_sent,
    .send_req_id, .send_req_read,
    .ask_id, .ask_read, .send_data, .inhibit, .fifo_rst_n);

  id_fsm u_id (
    .clk, .rst_n, .ask_id, .bytes_sent, .send_req(send_req_id));

  read_fsm #(.SETTLE_TICKS(SETTLE_TICKS)) u_read (
    .clk, .rst_n, .ask_read, .rx_valid, .channel(rx_data),
    .adc_data, .adc_otr, .bytes_sent,
    .mux_sel, .mux_en_n, .sample, .send_req(send_req_read));

  send_fsm u_send (
    .clk, .rst_n, .send_data, .ask_id, .ask_read, .adc_data(sample),
    .tx_data, .tx_push, .bytes_sent);

endmodule
