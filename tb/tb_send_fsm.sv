// tb_send_fsm: pushes the ID text and NUL, or the two ADC bytes, one byte
// every two cycles, and never more bytes than were requested.
module tb_send_fsm;
  logic clk = 0, rst_n = 1, send_data = 0, ask_id = 0, ask_read = 0, tx_push;
  logic [9:0] adc_data = '0;
  logic [7:0] tx_data;
  logic [5:0] bytes_sent;
  int checks = 0, failures = 0;
  byte unsigned got[$];
  int last_push = -10, cyc = 0, min_gap = 100;
  int target = 0;
  bit active = 0;     // a reply is being requested

  send_fsm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (tx_push) begin
      got.push_back(tx_data);
      if (cyc - last_push < min_gap) min_gap = cyc - last_push;
      last_push = cyc;
    end
    // requester as the main machine does it: registered request
    if (active && bytes_sent >= 6'(target)) active = 0;
    send_data <= active && (bytes_sent < 6'(target));
  end

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
    string id = "LVPS Regulators Board fw. v0.02";
    logic [9:0] v;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ID reply
    @(negedge clk) begin target = 32; ask_id = 1; active = 1; end
    repeat (120) @(posedge clk);
    @(negedge clk) ask_id = 0;
    check(got.size() == 32, $sformatf("ID reply has %0d bytes", got.size()));
    for (int i = 0; i < 31 && i < got.size(); i++)
      check(got[i] == id[i], $sformatf("ID byte %0d = %h", i, got[i]));
    if (got.size() > 31) check(got[31] == 0, "NUL terminator");
    check(min_gap == 2, $sformatf("one byte per two cycles (gap %0d)", min_gap));
    // read replies
    for (int r = 0; r < 6; r++) begin
      v = (r == 0) ? 10'h3FF : 10'($urandom);
      got.delete();
      repeat (3) @(posedge clk);
      #1 check(bytes_sent == 0, "count cleared in IDLE");
      @(negedge clk) begin adc_data = v; target = 2; ask_read = 1; active = 1; end
      repeat (20) @(posedge clk);
      @(negedge clk) ask_read = 0;
      check(got.size() == 2, $sformatf("read reply has %0d bytes", got.size()));
      if (got.size() == 2) begin
        check(got[0] == {v[9:8], 6'b0}, $sformatf("high byte %h for %h", got[0], v));
        check(got[1] == v[7:0], $sformatf("low byte %h for %h", got[1], v));
        check((({2'b0, got[0]} << 2) | got[1]) == v, "bytes rebuild the sample");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
