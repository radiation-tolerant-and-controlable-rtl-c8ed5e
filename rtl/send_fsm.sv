// send_fsm: the one place that writes reply bytes into the I2C FIFO.
//
// Both the ID and the read-channel commands reply with bytes, so a single
// machine loads them, which keeps two machines from writing the FIFO at
// once. IDLE waits for send_data. LOAD picks the next byte, numbered by
// bytes_sent, from the ID text (ask_id) or from the 10-bit ADC sample
// (ask_read) and counts it. SEND pulses tx_push for that byte and goes
// back to LOAD. When send_data is low in LOAD the machine returns to IDLE,
// which clears bytes_sent.
//
// Interface: send_data, ask_id, ask_read from the main machine; adc_data
// from the read machine; tx_data/tx_push to the FIFO; bytes_sent (bytes
// pushed in this reply) to the main, ID and read machines.
// Timing: one byte every two clock cycles; bytes_sent counts a byte from
// the cycle its push is on tx_push.
//
// The three states and their transitions follow the document, as does the
// reply format (ID text then NUL; D9..D8 in bits 7:6 of the first read
// byte, D7..D0 in the second). Loading a byte only while send_data is high
// is this design's choice, so no byte beyond the requested count is pushed.
module send_fsm
  import lvps_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             send_data,
  input  logic             ask_id,
  input  logic             ask_read,
  input  logic [ADC_W-1:0] adc_data,
  output logic [7:0]       tx_data,
  output logic             tx_push,
  output logic [5:0]       bytes_sent
);

  typedef enum logic [1:0] {IDLE, LOAD, SEND} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      tx_data    <= '0;
      bytes_sent <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          bytes_sent <= '0;
          if (send_data) state <= LOAD;
        end
        LOAD: begin
          if (!send_data) begin
            state <= IDLE;
          end else begin
            if (ask_id)        tx_data <= id_byte(bytes_sent);
            else if (ask_read) tx_data <= read_byte(adc_data, bytes_sent);
            else               tx_data <= 8'h00;
            bytes_sent <= bytes_sent + 1'b1;
            state      <= SEND;
          end
        end
        SEND:    state <= LOAD;
        default: state <= IDLE;
      endcase
    end
  end

  assign tx_push = (state == SEND);

endmodule
