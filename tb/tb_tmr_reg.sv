// tb_tmr_reg: checks the triple-redundant register.
// A reference model follows d/en/reset; the voted output must match it.
// Upsets injected into one copy must be masked; upsets in two copies of a
// bit must show at the output (this proves the vote is 2-of-3, not a copy).
module tb_tmr_reg;
  localparam int W = 8;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] d = '0, q, model;
  logic [2:0][W-1:0] seu = '0;
  int checks = 0, failures = 0;

  tmr_reg #(.WIDTH(W), .RST_VAL(8'hA5)) dut (.clk, .rst_n, .en, .d, .seu, .q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1 check(q == 8'hA5, "reset value");
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 8'hA5;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = 8'($urandom);
      seu = '0;
      if (i % 5 == 2) seu[$urandom % 3] = 8'($urandom);   // single-copy upsets
      @(posedge clk);
      if (en) model = d;
      #1;
      check(q == model, $sformatf("cycle %0d: q=%h expected %h", i, q, model));
    end
    // one bit upset in two copies: the vote must follow the majority
    @(negedge clk);
    en = 0; seu = '0;
    seu[0] = 8'h01; seu[2] = 8'h01;
    @(posedge clk); #1;
    check(q == (model ^ 8'h01), "two upset copies win the vote");
    @(negedge clk);
    seu = '0; en = 1; d = 8'h3C;
    @(posedge clk); #1;
    check(q == 8'h3C, "rewrite scrubs all copies");
    // asynchronous reset
    @(negedge clk);
    rst_n = 0; #1;
    check(q == 8'hA5, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
