// delatch_ctrl: restarts the ADC after its latch-up protection trips.
//
// The ADC is expected to suffer rare single-event latch-ups, so its supply
// runs through a current-limiting switch (a "delatcher") that cuts the
// power and pulls its fault line low when the current exceeds a limit.
// This block then holds the switch's shutdown input high for RETRY_DELAY
// clock cycles and releases it, which powers the ADC up again. While the
// fault line stays low after that, shutdown stays released; when the fault
// line returns high the delay counter is cleared for the next event.
//
// Interface: clk, rst_n (asynchronous, active low), fault_n (from the
// switch, active low), shdn (to the switch, 1 = ADC supply off).
// Timing: shdn rises in the cycle after fault_n is seen low, stays high for
// RETRY_DELAY cycles, then falls. During reset shdn is high.
//
// The restart after a delay and the 50-cycle count follow the document;
// the 1 = off polarity and holding shdn high in reset also do. Treating
// the fault input as a plain synchronous level is this design's choice.
module delatch_ctrl #(
  parameter int unsigned RETRY_DELAY = 50
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fault_n,
  output logic shdn
);

  localparam int unsigned CW = $clog2(RETRY_DELAY + 1);
  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shdn  <= 1'b1;
      count <= '0;
    end else if (!fault_n) begin
      if (count < CW'(RETRY_DELAY)) begin
        shdn  <= 1'b1;
        count <= count + 1'b1;
      end else begin
        shdn  <= 1'b0;
      end
    end else begin
      shdn  <= 1'b0;
      count <= '0;
    end
  end

endmodule
