// id_fsm: answers the ID command with the board's identification string.
//
// IDLE waits for ask_id from the main machine. SEND requests bytes from
// the send machine (send_req) until ID_BYTES bytes, the text and its
// terminating NUL, have been pushed, then returns to IDLE.
//
// Interface: ask_id, bytes_sent in; send_req out. send_req is
// combinational from the state and bytes_sent so that it drops in the same
// cycle the last byte is counted; the main machine registers it.
//
// The two states and their transitions follow the document; the byte
// count (31 characters plus one NUL) is this design's reading of it.
module id_fsm
  import lvps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ask_id,
  input  logic [5:0] bytes_sent,
  output logic       send_req
);

  typedef enum logic {IDLE, SEND} state_e;
  state_e state;

  logic all_sent;
  assign all_sent = (bytes_sent >= 6'(ID_BYTES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= IDLE;
    else unique case (state)
      IDLE: if (ask_id)   state <= SEND;
      SEND: if (all_sent) state <= IDLE;
      default:            state <= IDLE;
    endcase
  end

  assign send_req = (state == SEND) && !all_sent;

endmodule
