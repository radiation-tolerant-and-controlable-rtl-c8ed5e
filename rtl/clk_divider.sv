// clk_divider: free-running counter that derives the slow clocks.
//
// A WIDTH-bit binary counter advances on every rising edge of the 40 MHz
// board clock. Its bit 1 is the ADC sampling clock (clk / 4 = 10 MHz) and
// its top bit blinks the status LED (clk / 2^WIDTH, about 2.4 Hz at the
// default 24 bits).
//
// Interface: clk, rst_n (asynchronous, active low, clears the counter),
// div4 (counter bit 1), msb (counter bit WIDTH-1). Both outputs come
// straight from flip-flops.
//
// The counter, its 24-bit length and the two taps are the document's.
module clk_divider #(
  parameter int unsigned WIDTH = 24
) (
  input  logic clk,
  input  logic rst_n,
  output logic div4,
  output logic msb
);

  logic [WIDTH-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

  assign div4 = count[1];
  assign msb  = count[WIDTH-1];

endmodule
