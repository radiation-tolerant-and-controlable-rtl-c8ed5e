// tb_channel_dump: a host session against the controller at its default
// parameters. The host first searches the bus: it addresses every address
// from 1 to 127 in write mode, and only the board's own address may
// acknowledge. Then it reads every monitored analog channel of the board,
// one read-channel command per channel, as the host's "analog channels
// dump" does.
//
// The board has 39 monitored channels, numbered 0 to 38. A behavioural
// model stands in for the analog switches and the ADC. The switch model
// decodes the select and enable pins back into a channel number; a pin
// setting that matches no channel gives code 0. The ADC model is a 10-bit
// converter with a 2 V range, clocked by adc_clk, with a six-clock
// pipeline. So a sample only shows the new channel some time after the
// pins change, and the controller's settling wait must cover that.
//
// The voltages fed in are a board's readings in millivolts. Channel 32 is
// above the ADC range: the model raises the out-of-range flag and outputs
// 0. For every channel the testbench checks:
//   * the pins select that channel;
//   * the two reply bytes rebuild the expected code;
//   * the code converts back to the input voltage within one step
//     (2000/1024 mV);
//   * an out-of-range channel reads 0x3FF.
// It prints one line per channel, as the host does. The bus runs at
// 100 kHz from the 40 MHz clock, and the command and the channel byte go
// in one write transaction.
module tb_channel_dump;
  localparam int Q = 100;                     // quarter SCL period: 100 kHz
  localparam logic [5:0] SW = 6'h2A;          // address switches
  localparam logic [6:0] ADDR = {1'b1, SW};
  localparam int N_CH = 39;
  localparam int ADC_LAT = 6;                 // ADC pipeline, in ADC clocks
  localparam real LSB_MV = 2000.0 / 1024.0;

  // input voltage of each channel in mV; a negative entry is over range
  localparam real CH_MV [N_CH] = '{
    1171.1, 1182.8,   11.7,    9.8,   11.7,   11.7, 1047.9, 1661.8,
     915.0, 1679.4,  846.5, 1671.6,  879.8, 1675.5,  903.2, 1669.6,
     852.4, 1652.0,  795.7, 1654.0,   86.0, 1659.8,    9.8, 1646.1,
     271.7, 1665.7,    9.8,   56.7,   11.7,   23.5,   11.7,   11.7,
      -1.0, 1468.2,    9.8,    9.8,   11.7,   11.7,   11.7};

  logic clk = 0, rst_pin_n = 0;
  logic m_scl = 1, m_sda_low = 0, sda;
  logic sda_drive_low, n_re, adc_clk, adc_otr, adc_fault_n = 1, adc_shdn, led;
  logic [9:0] adc_data;
  logic [2:0] mux_sel;
  logic [11:0] mux_en_n;
  logic [23:0] inhibit;
  int checks = 0, failures = 0;
  int n_read = 0, n_otr = 0, n_found = 0;
  logic [11:0] en_table [7] = '{12'h0FE, 12'h8FB, 12'h2F7, 12'hAEF,
                                12'h1DF, 12'h9BF, 12'h37F};

  assign sda = !(m_sda_low || sda_drive_low);

  lvps_fpga_top dut (
    .clk, .rst_pin_n, .scl_i(m_scl), .sda_i(sda), .sda_drive_low, .n_re,
    .i2c_addr(SW), .adc_clk, .adc_data, .adc_otr, .mux_sel, .mux_en_n,
    .adc_fault_n, .adc_shdn, .inhibit, .led);

  always #12.5 clk = ~clk;                    // 40 MHz

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", msg);
    end
  endtask

  // ---- analog switches + ADC model ----------------------------------------
  function automatic int selected_channel();
    for (int g = 0; g < 7; g++)
      if (mux_en_n == en_table[g]) return g * 8 + int'(mux_sel);
    return -1;
  endfunction

  function automatic logic [10:0] convert(input int ch);   // {otr, code}
    real mv;
    if (ch < 0 || ch >= N_CH) return '0;
    mv = CH_MV[ch];
    if (mv < 0.0) return {1'b1, 10'd0};
    return {1'b0, 10'($rtoi(mv / LSB_MV + 0.5))};
  endfunction

  logic [10:0] pipe [ADC_LAT];
  initial for (int i = 0; i < ADC_LAT; i++) pipe[i] = '0;
  always @(posedge adc_clk) begin
    for (int i = ADC_LAT - 1; i > 0; i--) pipe[i] <= pipe[i-1];
    pipe[0] <= convert(selected_channel());
  end
  assign {adc_otr, adc_data} = pipe[ADC_LAT-1];

  always @(posedge clk) if (rst_pin_n && sda_drive_low && !n_re) begin
    failures++;
    if (failures <= 20) $display("FAIL: SDA driven with the transceiver receiving");
  end

  // ---- I2C master model -------------------------------------------------
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
      if (i == 0) begin @(posedge clk); m_sda_low = 0; end
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

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit k;
    logic [7:0] b1, b2;
    logic [9:0] got;
    logic [10:0] want;
    real mv;

    repeat (5) @(posedge clk);
    #3 rst_pin_n = 1;
    repeat (4) @(posedge clk);

    // device search: only the board's own address answers
    for (int a = 1; a < 128; a++) begin
      i2c_start();
      send_byte({7'(a), 1'b0}, k);
      i2c_stop();
      check(k == (7'(a) == ADDR), $sformatf("address %h %s", a, k ? "answered" : "silent"));
      if (k) begin n_found++; $display("device found at address %h", a); end
    end
    check(n_found == 1, "exactly one device found");

    $display("START OF DATA DUMP");
    for (int ch = 0; ch < N_CH; ch++) begin
      // command byte and channel number in one write
      i2c_start();
      send_byte({ADDR, 1'b0}, k);  check(k, "address ACK");
      send_byte(8'hFE, k);         check(k, "read command ACK");
      send_byte(8'(ch), k);        check(k, "channel ACK");
      i2c_stop();
      check(selected_channel() == ch,
            $sformatf("pins select channel %0d (sel=%0d en=%h)", ch, mux_sel, mux_en_n));
      // read the two reply bytes
      i2c_start();
      send_byte({ADDR, 1'b1}, k);  check(k, "address ACK (read)");
      recv_byte(1'b1, b1);
      recv_byte(1'b0, b2);
      i2c_stop();
      got  = {b1[7:6], b2};
      want = convert(ch);
      check(b1[5:0] == 0, $sformatf("channel %0d first byte padding", ch));
      if (want[10]) begin
        check(got == 10'h3FF, $sformatf("channel %0d out of range reads %h", ch, got));
        if (got == 10'h3FF) n_otr++;
        $display("Voltage of Channel %0d Out Of Range", ch);
      end else begin
        mv = real'(got) * LSB_MV;
        check(got == want[9:0], $sformatf("channel %0d code %0d expected %0d", ch, got, want[9:0]));
        check(mv - CH_MV[ch] < LSB_MV && CH_MV[ch] - mv < LSB_MV,
              $sformatf("channel %0d voltage %.1f mV expected %.1f mV", ch, mv, CH_MV[ch]));
        $display("Voltage of Channel %0d = %.1f mV", ch, mv);
      end
      n_read++;
    end
    $display("END OF DATA DUMP");

    check(n_read == N_CH && n_otr == 1, "every channel read, one out of range");
    check(inhibit == 24'hFFFFFF, "regulators untouched by the dump");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
