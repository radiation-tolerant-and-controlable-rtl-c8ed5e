// read_fsm: reads one analog channel through the multiplexers and the ADC.
//
// One ADC serves every monitored voltage, current and temperature. Its
// input is chosen by a bank of 8-input analog switches that share three
// select pins (A, B, C) and each have an enable pin (active low). After the
// read-channel command, the next byte written by the master is the channel
// number: bits 2:0 drive the select pins, bits 6:3 choose the switch
// through the enable table in lvps_pkg.
//
// IDLE waits for that byte (ask_read and rx_valid). SETMUX sets the
// select and enable pins. WAIT_ADC lets the switches and the ADC settle
// for SETTLE_TICKS cycles and then takes the sample; an out-of-range flag
// from the ADC turns the sample into all ones. SEND requests the two reply
// bytes from the send machine and returns to IDLE when both are pushed.
// The pins keep their setting until the next read.
//
// Interface: ask_read, rx_valid, channel (the byte received), adc_data,
// adc_otr, bytes_sent in; mux_sel, mux_en_n, sample, send_req out.
// Timing: the sample is taken SETTLE_TICKS + 2 clock edges after the edge
// that sees rx_valid (about 5 us at 40 MHz with the default).
//
// States, transitions, the 200-cycle wait, the OTR rule and the enable
// table follow the document. It clocks this machine on the falling edge;
// here all machines share the rising edge.
// Bit 7 of the channel byte is ignored, as no switch group needs it.
module read_fsm
  import lvps_pkg::*;
#(
  parameter int unsigned SETTLE_TICKS = 200
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ask_read,
  input  logic                 rx_valid,
  input  logic [7:0]           channel,
  input  logic [ADC_W-1:0]     adc_data,
  input  logic                 adc_otr,
  input  logic [5:0]           bytes_sent,
  output logic [MUX_SEL_W-1:0] mux_sel,
  output logic [MUX_EN_W-1:0]  mux_en_n,
  output logic [ADC_W-1:0]     sample,
  output logic                 send_req
);

  typedef enum logic [1:0] {IDLE, SETMUX, WAIT_ADC, SEND} state_e;
  state_e state;

  localparam int unsigned TW = $clog2(SETTLE_TICKS + 1);
  logic [TW-1:0] ticks;

  logic all_sent;
  assign all_sent = (bytes_sent >= 6'(READ_BYTES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      ticks    <= '0;
      mux_sel  <= '0;
      mux_en_n <= MUX_ALL_OFF;
      sample   <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          ticks <= '0;
          if (ask_read && rx_valid) state <= SETMUX;
        end
        SETMUX: begin
          mux_sel  <= channel[2:0];
          mux_en_n <= mux_enable(channel[6:3]);
          state    <= WAIT_ADC;
        end
        WAIT_ADC: begin
          if (ticks == TW'(SETTLE_TICKS)) begin
            sample <= adc_otr ? '1 : adc_data;
            state  <= SEND;
          end else begin
            ticks <= ticks + 1'b1;
          end
        end
        SEND: if (all_sent) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign send_req = (state == SEND) && !all_sent;

endmodule
