// tb_delatch_ctrl: after a fault the ADC switch is held off for exactly
// RETRY_DELAY cycles and then released; a cleared fault re-arms the count.
module tb_delatch_ctrl;
  localparam int DELAY = 50;
  logic clk = 0, rst_n = 1, fault_n = 1, shdn;
  int checks = 0, failures = 0;

  delatch_ctrl dut (.clk, .rst_n, .fault_n, .shdn);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial #1 rst_n = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int high;
    #2 check(shdn == 1'b1, "off during reset");
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1 check(shdn == 1'b0, "on after reset with no fault");
    for (int ev = 0; ev < 4; ev++) begin
      @(negedge clk) fault_n = 0;
      high = 0;
      repeat (DELAY + 20) begin
        @(posedge clk); #1;
        if (shdn) high++;
      end
      check(high == DELAY, $sformatf("event %0d: shdn high %0d cycles", ev, high));
      check(shdn == 1'b0, "released while fault persists");
      @(negedge clk) fault_n = 1;
      @(posedge clk); #1 check(shdn == 1'b0, "stays on after fault clears");
      repeat (ev * 3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
