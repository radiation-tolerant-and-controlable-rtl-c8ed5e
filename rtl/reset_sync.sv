// reset_sync: conditions the board's reset input for the controller.
//
// The reset pin (active low, from an RC pulser on the board) is passed
// through two flip-flops. The internal reset rst_n is the AND of the pin
// and the second flip-flop: it asserts at once, without waiting for a
// clock, and releases two rising clock edges after the pin goes high, so
// every register leaves reset on the same clock edge.
//
// Interface: clk, rst_pin_n (asynchronous, active low), rst_n (active low).
// Timing: rst_n falls with rst_pin_n and rises after the second rising
// clock edge that sees rst_pin_n high.
//
// The two-flip-flop structure and the AND are the document's; the
// flip-flops are the triple-redundant register of this design. They have
// no reset of their own, as in the document.
module reset_sync (
  input  logic clk,
  input  logic rst_pin_n,
  output logic rst_n
);

  logic stage1, stage2;

  tmr_reg #(.WIDTH(1), .RST_VAL(1'b0)) u_stage1 (
    .clk, .rst_n(1'b1), .en(1'b1), .d(rst_pin_n), .seu('0), .q(stage1)
  );
  tmr_reg #(.WIDTH(1), .RST_VAL(1'b0)) u_stage2 (
    .clk, .rst_n(1'b1), .en(1'b1), .d(stage1), .seu('0), .q(stage2)
  );

  assign rst_n = rst_pin_n & stage2;

endmodule
