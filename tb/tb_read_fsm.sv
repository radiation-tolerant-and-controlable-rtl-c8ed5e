// tb_read_fsm: channel byte to multiplexer pins, the settling wait before
// the sample, the out-of-range rule and the two-byte reply request.
module tb_read_fsm;
  localparam int SETTLE = 200;
  logic clk = 0, rst_n = 1, ask_read = 0, rx_valid = 0, adc_otr = 0, send_req;
  logic [7:0] channel = '0;
  logic [9:0] adc_data = '0, sample;
  logic [5:0] bytes_sent = '0;
  logic [2:0] mux_sel;
  logic [11:0] mux_en_n;
  int checks = 0, failures = 0;
  // enable words per channel group, active low; other groups: all off
  logic [11:0] en_table [7] = '{12'h0FE, 12'h8FB, 12'h2F7, 12'hAEF,
                                12'h1DF, 12'h9BF, 12'h37F};

  read_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial #1 rst_n = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic [11:0] exp_en;
    logic [9:0] v;
    #2 check(mux_en_n == 12'hFFF, "all switches off after reset");
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      channel = (r < 16) ? 8'(r * 8 + r % 8) : 8'($urandom);
      v = 10'($urandom);
      adc_otr = (r % 7 == 3);
      exp_en = (channel[6:3] < 7) ? en_table[channel[6:3]] : 12'h0FF;
      @(negedge clk) ask_read = 1;
      repeat (3) @(posedge clk);
      #1 check(send_req == 0, "rx_valid needed before a read starts");
      @(negedge clk) begin rx_valid = 1; adc_data = 10'h155; end
      @(negedge clk) rx_valid = 0;
      @(posedge clk); #1;
      check(mux_sel == channel[2:0], $sformatf("select for channel %0d", channel));
      check(mux_en_n == exp_en, $sformatf("enable %h for channel %0d", mux_en_n, channel));
      // the sample must be the ADC word at the end of the wait
      lat = 2;
      while (!send_req && lat < 1000) begin
        @(negedge clk);
        if (lat == SETTLE - 2) adc_data = v;
        lat++;
      end
      check(lat == SETTLE + 4,   // counted from the strobe's negedge
            $sformatf("sample after %0d cycles", lat));
      check(sample == (adc_otr ? 10'h3FF : v), $sformatf("sample %h", sample));
      @(negedge clk) bytes_sent = 1;
      #1 check(send_req == 1, "still requesting after one byte");
      @(negedge clk) bytes_sent = 2;
      #1 check(send_req == 0, "request stops at two bytes");
      @(negedge clk) begin bytes_sent = 0; ask_read = 0; end
      @(posedge clk); #1;
      check(mux_en_n == exp_en, "selection kept after the read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
