// tb_clk_divider: div4 must be clk/4 and msb clk/2^WIDTH, both from reset.
module tb_clk_divider;
  localparam int W = 6;
  logic clk = 0, rst_n = 1, div4, msb;
  int checks = 0, failures = 0;

  clk_divider #(.WIDTH(W)) dut (.clk, .rst_n, .div4, .msb);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial #1 rst_n = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 check(div4 == 0 && msb == 0, "cleared in reset");
    @(negedge clk) rst_n = 1;
    for (int n = 1; n <= 300; n++) begin
      @(posedge clk); #1;
      check(div4 == n[1], $sformatf("div4 after %0d edges", n));
      check(msb == n[W-1], $sformatf("msb after %0d edges", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
