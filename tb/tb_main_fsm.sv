// tb_main_fsm: command decode, inhibit patterns, unknown commands, the
// EXECUTE wait for reply bytes, and bytes ignored while a command runs.
module tb_main_fsm;
  logic clk = 0, rst_n = 1;
  logic rx_valid = 0, send_req_id = 0, send_req_read = 0;
  logic [7:0] rx_data = '0;
  logic [5:0] bytes_sent = '0;
  logic ask_id, ask_read, send_data, fifo_rst_n;
  logic [23:0] inhibit;
  int checks = 0, failures = 0;

  main_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one-cycle byte strobe, like the I2C slave gives
  task automatic give(input logic [7:0] b);
    @(negedge clk) begin rx_valid = 1; rx_data = b; end
    @(negedge clk) rx_valid = 0;
  endtask

  initial #1 rst_n = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 check(inhibit == 24'hFFFFFF && fifo_rst_n == 0, "reset: all off, FIFO held in reset");
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1 check(fifo_rst_n == 1, "FIFO released");

    // power up: inhibit changes at the end of DECODE, two edges after the strobe
    @(negedge clk) begin rx_valid = 1; rx_data = 8'hFB; end
    @(posedge clk); #1 check(inhibit == 24'hFFFFFF, "not yet changed in IDLE");
    @(negedge clk) rx_valid = 0;
    @(posedge clk); #1 check(inhibit == 24'h000000, "power up: all on");
    repeat (3) @(posedge clk);
    give(8'hFC);
    repeat (2) @(posedge clk); #1 check(inhibit == 24'hFFFFFF, "power down: all off");
    give(8'hFD);
    repeat (2) @(posedge clk); #1 check(inhibit == 24'b1111_1111_0001_0011_0111_1110, "first board on");
    give(8'hFC);
    repeat (3) @(posedge clk);

    // unknown command goes straight back to IDLE: a byte right after it is taken
    @(negedge clk) begin rx_valid = 1; rx_data = 8'h42; end
    @(negedge clk) rx_valid = 0;                       // DECODE of 0x42
    @(negedge clk) begin rx_valid = 1; rx_data = 8'hFB; end // IDLE again
    @(negedge clk) rx_valid = 0;
    @(posedge clk); #1 check(inhibit == 24'h000000, "byte after unknown command decoded");
    check(!ask_id && !ask_read, "unknown command raises nothing");
    repeat (3) @(posedge clk);

    // ID command: waits for 32 bytes, ignores other bytes meanwhile
    give(8'hFA);
    @(posedge clk); #1 check(ask_id == 1, "ask_id raised");
    check(fifo_rst_n == 0, "FIFO emptied for the reply");
    @(negedge clk) send_req_id = 1;
    @(posedge clk); @(posedge clk); #1 check(send_data == 1, "send_data follows the request");
    give(8'hFC);                                         // must be ignored
    repeat (5) @(posedge clk);
    #1 check(inhibit == 24'h000000, "bytes during EXECUTE are not decoded");
    @(negedge clk) bytes_sent = 6'd31;
    repeat (3) @(posedge clk); #1 check(ask_id == 1, "still busy at 31 bytes");
    @(negedge clk) begin bytes_sent = 6'd32; send_req_id = 0; end
    @(posedge clk); #1 check(ask_id == 0 && send_data == 0, "finished at 32 bytes");
    @(negedge clk) bytes_sent = 0;

    // read command: two bytes
    give(8'hFE);
    @(posedge clk); #1 check(ask_read == 1 && ask_id == 0, "ask_read raised");
    @(negedge clk) send_req_read = 1;
    @(posedge clk); @(posedge clk); #1 check(send_data == 1, "send_data for read");
    @(negedge clk) bytes_sent = 6'd1;
    repeat (2) @(posedge clk); #1 check(ask_read == 1, "busy after one byte");
    @(negedge clk) begin bytes_sent = 6'd2; send_req_read = 0; end
    @(posedge clk); #1 check(ask_read == 0, "finished after two bytes");
    @(negedge clk) bytes_sent = 0;
    repeat (3) @(posedge clk);
    give(8'hFD);
    repeat (2) @(posedge clk); #1 check(inhibit == 24'hFF137E, "accepts commands again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
