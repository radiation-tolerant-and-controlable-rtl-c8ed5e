// tb_id_fsm: the ID machine requests bytes until 32 have been pushed.
module tb_id_fsm;
  logic clk = 0, rst_n = 1, ask_id = 0, send_req;
  logic [5:0] bytes_sent = '0;
  int checks = 0, failures = 0;

  id_fsm dut (.*);

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
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      repeat (3) @(posedge clk);
      #1 check(send_req == 0, "quiet while not asked");
      @(negedge clk) ask_id = 1;
      @(posedge clk); #1 check(send_req == 1, "requests after ask_id");
      for (int n = 1; n <= 32; n++) begin
        @(negedge clk) bytes_sent = 6'(n);
        #1 check(send_req == (n < 32), $sformatf("request at %0d bytes", n));
      end
      @(posedge clk); #1;
      @(negedge clk) begin ask_id = 0; bytes_sent = 0; end
      @(posedge clk); #1 check(send_req == 0, "back in IDLE");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
