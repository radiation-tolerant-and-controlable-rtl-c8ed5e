// tmr_reg: triple-modular-redundant register with majority voting.
//
// The controller runs in a radiation area where a particle can flip a
// stored bit (single event upset). Each bit is therefore held in three
// flip-flops and read through a 2-out-of-3 vote, so one upset copy does
// not change the output. The register is written with d when en is high
// and cleared to RST_VAL by the asynchronous active-low reset; every copy
// loads the same value. Used with en tied high and d computed from q (a
// state machine or a shift register), a wrong copy is overwritten at the
// next clock edge.
//
// Interface: clk, rst_n (async, active low), en, d, q (voted value, valid
// the cycle after the edge that wrote it). seu is a fault-injection input
// for verification: a 1 in seu[k] inverts the matching bit of copy k at the
// next clock edge instead of the normal update. Tie it to zero in a design.
//
// The document names triple-redundant flip-flops, registers and state
// registers as building blocks of the I2C slave without giving their
// insides; the three-copies-and-vote structure and the seu input are this
// design's choice.
module tmr_reg #(
  parameter int unsigned        WIDTH   = 1,
  parameter logic [WIDTH-1:0]   RST_VAL = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [WIDTH-1:0]        d,
  input  logic [2:0][WIDTH-1:0]   seu,
  output logic [WIDTH-1:0]        q
);

  logic [2:0][WIDTH-1:0] copy;

  for (genvar k = 0; k < 3; k++) begin : g_copy
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        copy[k] <= RST_VAL;
      else if (|seu[k])
        copy[k] <= copy[k] ^ seu[k];
      else if (en)
        copy[k] <= d;
    end
  end

  // bitwise majority of the three copies
  assign q = (copy[0] & copy[1]) | (copy[1] & copy[2]) | (copy[0] & copy[2]);

endmodule
