// main_fsm: decodes and executes the one-byte I2C commands.
//
// Three states. IDLE waits for a byte from the I2C slave (rx_valid).
// DECODE looks at the byte: the three power commands set all 24 inhibit
// outputs of the regulators at once (all on, all off, or only the first front-end
// board's regulators on); the ID and read-channel commands raise ask_id or
// ask_read for the state machines that do the work; any other byte is an
// unknown command and sends the machine straight back to IDLE. EXECUTE
// waits until the command has finished (immediately for power commands,
// after ID_BYTES or READ_BYTES bytes have gone to the FIFO otherwise) and
// returns to IDLE. While in EXECUTE, send_data repeats, one cycle later,
// the send requests of the ID and read machines to the send machine.
//
// Interface: rx_valid/rx_data from the I2C slave; bytes_sent from the send
// machine; send_req_id/send_req_read from the ID and read machines.
// inhibit: 1 = regulator off; all off after reset. fifo_rst_n is low in
// reset and for one cycle when a command that produces a reply is decoded.
// Timing: DECODE follows rx_valid by one cycle, a power command changes
// inhibit at the end of DECODE, and the machine is back in IDLE two cycles
// after rx_valid.
//
// The states, transitions, command codes and inhibit patterns follow the
// document. Emptying the FIFO when a reply command arrives, so that bytes
// the master left unread cannot precede the new reply, is this design's
// choice.
module main_fsm
  import lvps_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rx_valid,
  input  logic [7:0]            rx_data,
  input  logic [5:0]            bytes_sent,
  input  logic                  send_req_id,
  input  logic                  send_req_read,
  output logic                  ask_id,
  output logic                  ask_read,
  output logic                  send_data,
  output logic [N_INHIBIT-1:0]  inhibit,
  output logic                  fifo_rst_n
);

  typedef enum logic [1:0] {IDLE, DECODE, EXECUTE} state_e;
  state_e state;

  logic finished;
  assign finished = (ask_id   && bytes_sent >= 6'(ID_BYTES)) ||
                    (ask_read && bytes_sent >= 6'(READ_BYTES)) ||
                    (!ask_id && !ask_read);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      ask_id     <= 1'b0;
      ask_read   <= 1'b0;
      send_data  <= 1'b0;
      inhibit    <= INHIBIT_ALL_OFF;
      fifo_rst_n <= 1'b0;
    end else begin
      fifo_rst_n <= 1'b1;
      unique case (state)
        IDLE: begin
          ask_id    <= 1'b0;
          ask_read  <= 1'b0;
          send_data <= 1'b0;
          if (rx_valid) state <= DECODE;
        end
        DECODE: begin
          state <= EXECUTE;
          unique case (rx_data)
            CMD_ID:             begin ask_id   <= 1'b1; fifo_rst_n <= 1'b0; end
            CMD_READ_CHANNEL:   begin ask_read <= 1'b1; fifo_rst_n <= 1'b0; end
            CMD_POWER_UP:       inhibit <= INHIBIT_ALL_ON;
            CMD_POWER_DOWN:     inhibit <= INHIBIT_ALL_OFF;
            CMD_POWER_UP_FIRST: inhibit <= INHIBIT_FIRST_VFE;
            default:            state   <= IDLE;     // unknown command
          endcase
        end
        EXECUTE: begin
          send_data <= send_req_id | send_req_read;
          if (finished) begin
            state     <= IDLE;
            ask_id    <= 1'b0;
            ask_read  <= 1'b0;
            send_data <= 1'b0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
