// i2c_tx_fifo: first-in first-out buffer for the bytes the I2C slave sends.
//
// The command state machines push reply bytes (an ID string, ADC samples)
// faster than the I2C master reads them; the FIFO holds them until the
// slave shifts them out in a read transfer. It is a DEPTH x 8 memory with
// a write and a read pointer, one bit wider than the address so that full
// and empty can be told apart.
//
// Interface: clk; rst_n clears both pointers (asynchronous, active low);
// wr_en with wr_data stores a byte on the rising edge unless the FIFO is
// full; rd_en removes the oldest byte unless it is empty, and rd_data
// shows it from the next clock cycle on (registered read, one cycle of
// latency). rd_data keeps its value when nothing is read. full, empty and
// level describe the contents after the last edge.
//
// The document gives the FIFO's role and its byte-wide write port and
// reset; its depth is not given, and 64 bytes, enough for the 32-byte ID
// reply, is this design's choice.
module i2c_tx_fifo #(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [7:0] wr_data,
  input  logic       rd_en,
  output logic [7:0] rd_data,
  output logic       full,
  output logic       empty,
  output logic [AW:0] level
);

  logic [7:0] mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;

  assign level = wr_ptr - rd_ptr;
  assign empty = (wr_ptr == rd_ptr);
  assign full  = (level == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      rd_data <= '0;
    end else begin
      if (wr_en && !full) wr_ptr <= wr_ptr + 1'b1;
      if (rd_en && !empty) begin
        rd_data <= mem[rd_ptr[AW-1:0]];
        rd_ptr  <= rd_ptr + 1'b1;
      end
    end
  end

endmodule
