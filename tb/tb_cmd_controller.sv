// tb_cmd_controller: command-level test of the four machines together.
// A queue stands in for the I2C FIFO (emptied by fifo_rst_n). Checks the ID
// reply, power commands, channel reads with multiplexer pins and reply
// bytes, out-of-range samples, and unknown commands.
module tb_cmd_controller;
  localparam int SETTLE = 20;
  logic clk = 0, rst_n = 1, rx_valid = 0, tx_push, fifo_rst_n, adc_otr = 0;
  logic [7:0] rx_data = '0, tx_data;
  logic [9:0] adc_data = '0;
  logic [2:0] mux_sel;
  logic [11:0] mux_en_n;
  logic [23:0] inhibit;
  byte unsigned fifo[$];
  int checks = 0, failures = 0;
  logic [11:0] en_table [7] = '{12'h0FE, 12'h8FB, 12'h2F7, 12'hAEF,
                                12'h1DF, 12'h9BF, 12'h37F};

  cmd_controller #(.SETTLE_TICKS(SETTLE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!fifo_rst_n) fifo.delete();
    else if (tx_push) fifo.push_back(tx_data);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  // bytes arrive at I2C speed: strobe, then a gap
  task automatic give(input logic [7:0] b);
    @(negedge clk) begin rx_valid = 1; rx_data = b; end
    @(negedge clk) rx_valid = 0;
    repeat (100) @(posedge clk);
  endtask

  initial #1 rst_n = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string id = "LVPS Regulators Board fw. v0.02";
    logic [7:0] ch;
    logic [9:0] v, got;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(inhibit == 24'hFFFFFF, "regulators off after reset");

    give(8'hFA);
    check(fifo.size() == 32, $sformatf("ID reply %0d bytes", fifo.size()));
    for (int i = 0; i < 31 && i < fifo.size(); i++) check(fifo[i] == id[i], "ID character");
    if (fifo.size() == 32) check(fifo[31] == 0, "ID NUL");
    // a second ID command replaces unread bytes rather than appending
    give(8'hFA);
    check(fifo.size() == 32, "second ID reply replaces the first");

    give(8'hFB); check(inhibit == 24'h000000, "power up");
    give(8'hFD); check(inhibit == 24'hFF137E, "power up first board");
    give(8'h13); check(inhibit == 24'hFF137E, "unknown command changes nothing");
    check(fifo.size() == 32, "unknown command queues nothing");
    give(8'hFC); check(inhibit == 24'hFFFFFF, "power down");

    for (int r = 0; r < 12; r++) begin
      ch = (r < 8) ? 8'(r * 9) : 8'($urandom);
      v = 10'($urandom);
      adc_data = v;
      adc_otr = (r == 5);
      give(8'hFE);
      give(ch);
      check(mux_sel == ch[2:0], "select pins");
      check(mux_en_n == ((ch[6:3] < 7) ? en_table[ch[6:3]] : 12'h0FF), "enable pins");
      check(fifo.size() == 2, $sformatf("read reply %0d bytes", fifo.size()));
      if (fifo.size() == 2) begin
        got = {fifo[0][7:6], fifo[1]};
        check(fifo[0][5:0] == 0, "unused bits zero");
        check(got == (adc_otr ? 10'h3FF : v), $sformatf("sample %h expected %h", got, v));
      end
      // a power command byte given as channel must not act as a command
      check(inhibit == 24'hFFFFFF, "channel byte not decoded as a command");
    end
    give(8'hFE); give(8'hFB);          // channel 0xFB: a read, not power up
    check(inhibit == 24'hFFFFFF && fifo.size() == 2, "0xFB after 0xFE is a channel");
    give(8'hFB); check(inhibit == 24'h000000, "commands accepted after the read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
