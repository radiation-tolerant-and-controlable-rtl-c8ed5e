// tb_i2c_tx_fifo: random pushes and pops against a queue model; checks
// data order, one-cycle read latency, full/empty flags and the reset.
module tb_i2c_tx_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 1, wr_en = 0, rd_en = 0, full, empty;
  logic [7:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH):0] level;
  byte unsigned model[$];
  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0;

  i2c_tx_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en,
                                    .rd_data, .full, .empty, .level);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial #1 rst_n = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned expected;
    bit popped;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // bias toward filling in the first half and draining in the second
      wr_en   = ($urandom % 100) < ((i % 400) < 200 ? 70 : 30);
      rd_en   = ($urandom % 100) < ((i % 400) < 200 ? 30 : 70);
      wr_data = 8'($urandom);
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      check(level == model.size(), "level");
      if (full) n_full++;
      if (empty && rd_en) n_empty_rd++;
      popped = rd_en && model.size() > 0;
      if (popped) expected = model.pop_front();
      if (wr_en && model.size() < DEPTH + (popped ? 1 : 0) && !full) model.push_back(wr_data);
      @(posedge clk); #1;
      if (popped) check(rd_data == expected, $sformatf("read %h expected %h", rd_data, expected));
    end
    check(n_full > 0, "full was reached");
    check(n_empty_rd > 0, "read of empty FIFO was tried");
    // reset empties it
    @(negedge clk); wr_en = 1; rd_en = 0; wr_data = 8'h11;
    @(negedge clk); wr_en = 0; rst_n = 0;
    #1 check(empty, "reset empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
