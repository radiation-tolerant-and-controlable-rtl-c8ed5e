// tb_lvps_fpga_top: the whole controller at its default parameters, driven
// over I2C at 100 kHz from a 40 MHz clock, as the remote control board
// would. An ADC model returns a value that depends on which multiplexer
// pins are set. Every mechanism is counted and must occur at least once:
// ID string readout, the three power commands, channel reads (channel
// byte in the command's transaction or in a transaction of its own), an
// out-of-range sample, an unknown command, another device's address, a
// reply that replaces unread bytes, masked single-event upsets (one copy
// of every triple-redundant register flipping on every clock), an ADC
// latch-up restart, and the LED and ADC clocks.
module tb_lvps_fpga_top;
  localparam int Q = 100;                     // quarter SCL period: 100 kHz
  localparam logic [5:0] SW = 6'h15;          // address switches
  localparam logic [6:0] ADDR = {1'b1, SW};
  logic clk = 0, rst_pin_n = 0;
  logic m_scl = 1, m_sda_low = 0, sda;
  logic sda_drive_low, n_re, adc_clk, adc_otr = 0, adc_fault_n = 1, adc_shdn, led;
  logic [9:0] adc_data;
  logic [2:0] mux_sel;
  logic [11:0] mux_en_n;
  logic [23:0] inhibit;
  int checks = 0, failures = 0;
  int n_id = 0, n_up = 0, n_down = 0, n_first = 0, n_read = 0, n_split = 0, n_otr = 0,
      n_unknown = 0, n_other = 0, n_replace = 0, n_delatch = 0, n_led = 0, n_adcclk = 0, n_seu = 0;
  logic [11:0] en_table [7] = '{12'h0FE, 12'h8FB, 12'h2F7, 12'hAEF,
                                12'h1DF, 12'h9BF, 12'h37F};

  assign sda = !(m_sda_low || sda_drive_low);
  // ADC model: output depends on the analog switch setting
  assign adc_data = 10'(mux_en_n * 7 + mux_sel * 131);

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
  task automatic write_cmd(input logic [6:0] a, input logic [7:0] b, output bit ack);
    bit k;
    i2c_start();
    send_byte({a, 1'b0}, ack);
    if (ack) begin send_byte(b, k); ack &= k; end
    i2c_stop();
    repeat (200) @(posedge clk);
  endtask
  task automatic write_cmd_arg(input logic [7:0] b, input logic [7:0] arg);
    bit k;
    i2c_start();
    send_byte({ADDR, 1'b0}, k); check(k, "address ACK");
    send_byte(b, k);   check(k, "command ACK");
    send_byte(arg, k); check(k, "argument ACK");
    i2c_stop();
    repeat (400) @(posedge clk);              // > 200-cycle ADC wait
  endtask
  task automatic read_bytes(input int n, output byte unsigned q[$]);
    bit k;
    logic [7:0] b;
    q.delete();
    i2c_start();
    send_byte({ADDR, 1'b1}, k); check(k, "address ACK (read)");
    for (int i = 0; i < n; i++) begin recv_byte(i != n - 1, b); q.push_back(b); end
    i2c_stop();
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string id = "LVPS Regulators Board fw. v0.02";
    byte unsigned q[$];
    bit ack;
    logic [7:0] ch;
    logic [9:0] got, expv;
    logic [11:0] en;
    int t0, hi, led_edge;

    repeat (5) @(posedge clk);
    #3 rst_pin_n = 1;
    t0 = 0;
    repeat (4) @(posedge clk);
    check(inhibit == 24'hFFFFFF, "all regulators off after reset");
    check(mux_en_n == 12'hFFF, "all switches off after reset");
    check(adc_shdn == 0, "ADC powered after reset");

    // ADC clock is clk/4: the sampled level repeats every 4 cycles and
    // flips every 2
    begin
      logic [31:0] seq;
      bit ok = 1;
      for (int k = 0; k < 32; k++) begin @(posedge clk); #1; seq[k] = adc_clk; end
      for (int k = 0; k < 28; k++) if (seq[k] != seq[k+4] || seq[k] == seq[k+2]) ok = 0;
      check(ok, $sformatf("ADC clock is clk/4 (%b)", seq));
      if (ok) n_adcclk++;
    end

    // ---- ID string ----
    write_cmd(ADDR, 8'hFA, ack); check(ack, "ID command ACK");
    read_bytes(32, q);
    begin
      bit ok = 1;
      for (int i = 0; i < 31; i++) if (q[i] != id[i]) ok = 0;
      if (q[31] != 0) ok = 0;
      check(ok, "ID string read back");
      if (ok) n_id++;
    end

    // ---- unread reply replaced by the next one ----
    write_cmd(ADDR, 8'hFA, ack);
    read_bytes(5, q);                          // master stops early
    write_cmd(ADDR, 8'hFA, ack);
    read_bytes(3, q);
    check(q[0] == "L" && q[1] == "V" && q[2] == "P", "new reply starts at the beginning");
    if (q[0] == "L" && q[1] == "V" && q[2] == "P") n_replace++;

    // ---- power commands ----
    write_cmd(ADDR, 8'hFB, ack);
    check(inhibit == 24'h000000, "power up"); if (inhibit == 0) n_up++;
    write_cmd(ADDR, 8'hFD, ack);
    check(inhibit == 24'hFF137E, "first board"); if (inhibit == 24'hFF137E) n_first++;
    write_cmd(ADDR, 8'hFC, ack);
    check(inhibit == 24'hFFFFFF, "power down"); if (inhibit == 24'hFFFFFF) n_down++;

    // ---- unknown command and another device ----
    write_cmd(ADDR, 8'h01, ack);
    check(ack && inhibit == 24'hFFFFFF, "unknown command acknowledged, ignored");
    write_cmd(ADDR, 8'hFB, ack);
    check(inhibit == 24'h000000, "command after unknown one works");
    if (inhibit == 0) n_unknown++;
    write_cmd(7'h3F, 8'hFC, ack);
    check(!ack && inhibit == 24'h000000, "other address ignored");
    if (!ack && inhibit == 0) n_other++;

    // ---- analog channel reads ----
    for (int r = 0; r < 10; r++) begin
      ch = (r < 7) ? 8'(r * 8 + (r * 3) % 8) : 8'($urandom % 128);
      adc_otr = (r == 4);
      if (r % 2 == 0) write_cmd_arg(8'hFE, ch);
      else begin                               // command and channel apart
        write_cmd(ADDR, 8'hFE, ack); check(ack, "read command ACK");
        write_cmd(ADDR, ch, ack);    check(ack, "channel ACK");
        repeat (200) @(posedge clk);
        n_split++;
      end
      en = (ch[6:3] < 7) ? en_table[ch[6:3]] : 12'h0FF;
      check(mux_sel == ch[2:0] && mux_en_n == en, $sformatf("switches for channel %0d", ch));
      read_bytes(2, q);
      got = {q[0][7:6], q[1]};
      expv = adc_otr ? 10'h3FF : 10'(en * 7 + ch[2:0] * 131);
      check(got == expv, $sformatf("channel %0d read %h expected %h", ch, got, expv));
      if (got == expv) begin n_read++; if (adc_otr) n_otr++; end
    end
    adc_otr = 0;

    // ---- single-event upsets: the middle copy of every triple-redundant
    // register in the reset path and the I2C slave flips on every clock
    // while a full ID readout, a power command and a channel read run ----
    force dut.u_reset.u_stage1.seu   = 3'b010;
    force dut.u_reset.u_stage2.seu   = 3'b010;
    force dut.u_i2c.u_sync0.seu      = 6'b00_11_00;
    force dut.u_i2c.u_sync1.seu      = 6'b00_11_00;
    force dut.u_i2c.u_sda_prev.seu   = 3'b010;
    force dut.u_i2c.u_startstop.seu  = 6'b00_11_00;
    force dut.u_i2c.u_ctrl.seu       = 9'b000_111_000;
    force dut.u_i2c.u_ad.seu         = 9'b000_111_000;
    force dut.u_i2c.u_addr_sh.seu    = 24'h00_FF_00;
    force dut.u_i2c.u_wr.seu         = 9'b000_111_000;
    force dut.u_i2c.u_wr_sh.seu      = 24'h00_FF_00;
    force dut.u_i2c.u_rx_valid.seu   = 3'b010;
    force dut.u_i2c.u_rd.seu         = 9'b000_111_000;
    force dut.u_i2c.u_rd_sh.seu      = 24'h00_FF_00;
    begin
      bit ok = 1;
      write_cmd(ADDR, 8'hFA, ack); ok &= ack;
      read_bytes(32, q);
      for (int i = 0; i < 31; i++) if (q[i] != id[i]) ok = 0;
      if (q[31] != 0) ok = 0;
      write_cmd(ADDR, 8'hFC, ack); ok &= ack && inhibit == 24'hFFFFFF;
      write_cmd_arg(8'hFE, 8'd13);
      read_bytes(2, q);
      ok &= {q[0][7:6], q[1]} == 10'(en_table[1] * 7 + 5 * 131);
      check(ok, "ID, power and read commands with one register copy upset every cycle");
      if (ok) n_seu++;
    end
    release dut.u_reset.u_stage1.seu;
    release dut.u_reset.u_stage2.seu;
    release dut.u_i2c.u_sync0.seu;
    release dut.u_i2c.u_sync1.seu;
    release dut.u_i2c.u_sda_prev.seu;
    release dut.u_i2c.u_startstop.seu;
    release dut.u_i2c.u_ctrl.seu;
    release dut.u_i2c.u_ad.seu;
    release dut.u_i2c.u_addr_sh.seu;
    release dut.u_i2c.u_wr.seu;
    release dut.u_i2c.u_wr_sh.seu;
    release dut.u_i2c.u_rx_valid.seu;
    release dut.u_i2c.u_rd.seu;
    release dut.u_i2c.u_rd_sh.seu;
    write_cmd(ADDR, 8'hFB, ack);
    check(ack && inhibit == 24'h000000, "normal operation after the upsets stop");

    // ---- ADC latch-up: switch off 50 cycles, then restart ----
    @(negedge clk) adc_fault_n = 0;
    hi = 0;
    repeat (100) begin @(posedge clk); #1; if (adc_shdn) hi++; end
    @(negedge clk) adc_fault_n = 1;
    check(hi == 50, $sformatf("ADC held off %0d cycles", hi));
    if (hi == 50) n_delatch++;

    // ---- LED: top bit of the 24-bit counter ----
    led_edge = 0;
    while (!led && led_edge < 9_000_000) begin @(posedge clk); led_edge++; end
    check(led == 1, "LED blinks");
    if (led) n_led++;

    check(n_id > 0, "ID readout happened");
    check(n_up > 0 && n_down > 0 && n_first > 0, "all power commands happened");
    check(n_read >= 9 && n_otr > 0 && n_split > 0, "channel reads and out-of-range happened");
    check(n_unknown > 0 && n_other > 0 && n_replace > 0, "unknown / other address / replace happened");
    check(n_delatch > 0 && n_led > 0 && n_adcclk > 0, "delatcher, LED and ADC clock happened");
    check(n_seu > 0, "upsets masked");
    $display("mechanisms: id=%0d up=%0d down=%0d first=%0d read=%0d split=%0d otr=%0d unknown=%0d other=%0d replace=%0d delatch=%0d led=%0d adcclk=%0d seu=%0d",
             n_id, n_up, n_down, n_first, n_read, n_split, n_otr, n_unknown, n_other, n_replace, n_delatch, n_led, n_adcclk, n_seu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
