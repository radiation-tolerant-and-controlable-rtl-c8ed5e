// tb_reset_sync: reset must assert at once and release after two edges.
module tb_reset_sync;
  logic clk = 0, rst_pin_n = 0, rst_n;
  int checks = 0, failures = 0;

  reset_sync dut (.clk, .rst_pin_n, .rst_n);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    for (int trial = 0; trial < 10; trial++) begin
      #2;
      check(rst_n == 1'b0, "held in reset while pin low");
      @(negedge clk);
      rst_pin_n = 1;
      #1 check(rst_n == 1'b0, "not released before a clock edge");
      @(posedge clk); #1;
      check(rst_n == 1'b0, "not released after one edge");
      @(posedge clk); #1;
      check(rst_n == 1'b1, "released after two edges");
      repeat (3 + trial) @(posedge clk);
      #3 rst_pin_n = 0;          // mid-cycle: must assert without a clock
      #1 check(rst_n == 1'b0, "asynchronous assertion");
      repeat (2 + trial % 3) @(posedge clk);   // the board pulser is long
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
