// tb_i2c_slave: bit-level I2C master against the slave.
// Covers writes to its own and to another address (ACK / no ACK), data
// strobes, reads from the transmit FIFO with ACK and a final NACK, a
// repeated start, and the direction output: n_re must be high whenever
// the slave pulls SDA low, and low whenever the master does.
module tb_i2c_slave;
  localparam int Q = 12;                 // quarter SCL period in clocks
  localparam logic [6:0] ADDR = 7'h55;
  logic clk = 0, rst_n = 1, fifo_rst_n = 1;
  logic m_scl = 1, m_sda_low = 0;
  logic sda_drive_low, n_re, rx_valid, tx_push = 0;
  logic [7:0] rx_data, tx_data = '0;
  logic sda;
  int checks = 0, failures = 0, n_strobe = 0;
  byte unsigned rx_log[$];

  assign sda = !(m_sda_low || sda_drive_low);   // open-drain bus

  i2c_slave dut (.clk, .rst_n, .fifo_rst_n, .dev_addr(ADDR),
                 .scl_i(m_scl), .sda_i(sda), .sda_drive_low, .n_re,
                 .rx_valid, .rx_data, .tx_data, .tx_push);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (sda_drive_low && !n_re) begin failures++; $display("FAIL: drives SDA with n_re low"); end
    if (m_sda_low && n_re) begin failures++; $display("FAIL: n_re high while master drives t=%0t scl=%b rd=%0d ad=%0d wr=%0d pre=%b", $time, m_scl, dut.rd_q, dut.ad_q, dut.wr_q, dut.preread); end
    if (rx_valid) begin n_strobe++; rx_log.push_back(rx_data); end
  end

  task automatic qwait(); repeat (Q) @(posedge clk); endtask
  task automatic i2c_start();
    m_sda_low = 0; qwait(); m_scl = 1; qwait(); m_sda_low = 1; qwait(); m_scl = 0; qwait();
  endtask
  task automatic i2c_stop();
    m_sda_low = 1; qwait(); m_scl = 1; qwait(); m_sda_low = 0; qwait(); qwait();
  endtask
  task automatic send_byte(input logic [7:0] b, output bit ack);
    for (int i = 7; i >= 0; i--) begin
      m_sda_low = !b[i]; qwait(); m_scl = 1; qwait(); qwait(); m_scl = 0;
      if (i == 0) begin @(posedge clk); m_sda_low = 0; end   // short hold before ACK
      qwait();
    end
    qwait(); m_scl = 1; qwait(); ack = !sda; qwait(); m_scl = 0; qwait();
  endtask
  task automatic recv_byte(input bit ack, output logic [7:0] b);
    m_sda_low = 0;
    for (int i = 7; i >= 0; i--) begin
      qwait(); m_scl = 1; qwait(); b[i] = sda; qwait(); m_scl = 0;
    end
    qwait(); m_sda_low = ack; qwait(); m_scl = 1; qwait(); qwait(); m_scl = 0; m_sda_low = 0;
  endtask
  task automatic push(input logic [7:0] b);
    @(negedge clk) begin tx_push = 1; tx_data = b; end
    @(negedge clk) tx_push = 0;
  endtask

  initial #1 rst_n = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ack;
    logic [7:0] b;
    byte unsigned data[$];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (10) @(posedge clk);

    // write four bytes to this device
    data = '{8'h12, 8'hA5, 8'hFF, 8'h00};
    i2c_start();
    send_byte({ADDR, 1'b0}, ack); check(ack, "address ACK (write)");
    foreach (data[i]) begin send_byte(data[i], ack); check(ack, "data ACK"); end
    i2c_stop();
    check(n_strobe == 4, $sformatf("%0d data strobes", n_strobe));
    foreach (data[i]) if (i < rx_log.size()) check(rx_log[i] == data[i], $sformatf("byte %0d = %h", i, rx_log[i]));

    // another device's address: no ACK, nothing received
    rx_log.delete(); n_strobe = 0;
    i2c_start();
    send_byte({7'h2A, 1'b0}, ack); check(!ack, "no ACK for other address");
    send_byte(8'h77, ack); check(!ack, "no ACK for other device's data");
    i2c_stop();
    check(n_strobe == 0, "nothing received for other address");

    // read five bytes queued in the FIFO; the last is NACKed
    data = '{8'h4C, 8'h56, 8'h00, 8'hFF, 8'h81};
    foreach (data[i]) push(data[i]);
    i2c_start();
    send_byte({ADDR, 1'b1}, ack); check(ack, "address ACK (read)");
    foreach (data[i]) begin
      recv_byte(i != data.size() - 1, b);
      check(b == data[i], $sformatf("read byte %0d = %h expected %h", i, b, data[i]));
    end
    i2c_stop();

    // write, then a repeated start into a read
    rx_log.delete(); n_strobe = 0;
    push(8'h3C); push(8'hC3);
    i2c_start();
    send_byte({ADDR, 1'b0}, ack); check(ack, "address ACK before repeated start");
    send_byte(8'hFE, ack); check(ack, "command ACK");
    i2c_start();
    send_byte({ADDR, 1'b1}, ack); check(ack, "address ACK after repeated start");
    recv_byte(1, b); check(b == 8'h3C, "first byte after repeated start");
    recv_byte(0, b); check(b == 8'hC3, "second byte after repeated start");
    i2c_stop();
    check(n_strobe == 1 && rx_log[0] == 8'hFE, "byte before repeated start received");

    // the FIFO reset drops queued bytes
    push(8'h99);
    @(negedge clk) fifo_rst_n = 0;
    @(negedge clk) fifo_rst_n = 1;
    push(8'h5A);
    i2c_start();
    send_byte({ADDR, 1'b1}, ack);
    recv_byte(0, b); check(b == 8'h5A, "flushed byte is not sent");
    i2c_stop();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
