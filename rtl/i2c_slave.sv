// i2c_slave: I2C slave interface of the regulators-board controller.
//
// The board is controlled from a remote control board over an I2C bus. That
// bus is carried as LVDS through a bidirectional transceiver, so the slave
// has an input sda_i, an open-drain style output sda_drive_low and a
// direction output n_re (1 = this slave drives SDA, used for the
// transceiver's DE/RE pins). SCL comes only from the master and is an input.
//
// How it works. SCL and SDA are brought into the 40 MHz clock domain by two
// flip-flops each, and everything then runs on the clock, looking at levels
// of the synchronised lines:
//   * a start/stop detector flags SDA falling (start) or rising (stop)
//     while SCL is high;
//   * a control state machine goes to ADDR on a start, to IDLE on a stop,
//     and after the address byte to WRITE, READ or IGNORE (other device);
//   * the address cycle shifts in 7 address bits and R/W on rising SCL and
//     acknowledges only its own address (1, I2C_ADDRESS[5:0] on the board);
//   * the write cycle shifts in data bytes, acknowledges each one and then
//     shows it on rx_data with a one-cycle rx_valid pulse;
//   * the read cycle takes bytes from the transmit FIFO and shifts them out
//     MSB first, one bit per SCL low phase; a master NACK ends the transfer.
// State and shift registers are triple-redundant (tmr_reg) against
// single-event upsets.
//
// Interface: dev_addr is the 7-bit slave address; tx_data with tx_push
// writes one byte into the transmit FIFO (one per cycle); fifo_rst_n
// empties the FIFO. rx_data holds the last byte written by the master.
// Timing: the slave reacts 2-4 clock cycles after an SCL edge, and in a
// read it puts the next bit on SDA within about 6 cycles of SCL falling,
// so SCL must stay low for longer than that (at 100 kHz it is 200 cycles).
//
// The structure (synchronisers, start/stop detector, control, address,
// write and read machines, transmit FIFO, stretching n_re for a few cycles
// after the address acknowledge) follows the document. The separate bit
// counter per cycle, restarting the address cycle on any start, and
// latching the master's ACK while SCL is high are this design's choices.
// The FIFO's empty flag and fill level are left unconnected on purpose: a
// read past the end of a reply simply repeats the last byte. The reset is
// used both as an asynchronous reset and in the overflow assertion's
// disable condition, which lint tools report as a mixed-use net.
module i2c_slave #(
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fifo_rst_n,
  input  logic [6:0] dev_addr,
  // bus side
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       sda_drive_low,
  output logic       n_re,
  // controller side
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic [7:0] tx_data,
  input  logic       tx_push
);

  // ---------------------------------------------------------------- sync
  logic [1:0] pins_s0, pins_s;           // {scl, sda}
  logic       scl_s, sda_s;

  tmr_reg #(.WIDTH(2), .RST_VAL(2'b11)) u_sync0 (
    .clk, .rst_n, .en(1'b1), .d({scl_i, sda_i}), .seu('0), .q(pins_s0));
  tmr_reg #(.WIDTH(2), .RST_VAL(2'b11)) u_sync1 (
    .clk, .rst_n, .en(1'b1), .d(pins_s0), .seu('0), .q(pins_s));
  assign scl_s = pins_s[1];
  assign sda_s = pins_s[0];

  // --------------------------------------------------- start / stop detect
  logic sda_prev;
  logic start_d, stop_d, start_c, stop_c;

  tmr_reg #(.WIDTH(1), .RST_VAL(1'b1)) u_sda_prev (
    .clk, .rst_n, .en(1'b1), .d(sda_s), .seu('0), .q(sda_prev));

  assign start_d =  sda_prev & ~sda_s & scl_s;
  assign stop_d  = ~sda_prev &  sda_s & scl_s;

  tmr_reg #(.WIDTH(2), .RST_VAL(2'b00)) u_startstop (
    .clk, .rst_n, .en(1'b1), .d({start_d, stop_d}), .seu('0),
    .q({start_c, stop_c}));

  // ------------------------------------------------------ control machine
  typedef enum logic [2:0] {
    CTRL_IDLE, CTRL_ADDR, CTRL_WRITE, CTRL_READ, CTRL_IGNORE
  } ctrl_e;
  ctrl_e      ctrl_q, ctrl_d;
  logic [2:0] ctrl_raw;

  logic       addr_done;
  logic [7:0] addr_sh;                   // {address[6:0], R/nW}

  always_comb begin
    ctrl_d = ctrl_q;
    if (ctrl_q == CTRL_ADDR && addr_done) begin
      if (addr_sh[7:1] != dev_addr) ctrl_d = CTRL_IGNORE;
      else if (addr_sh[0])          ctrl_d = CTRL_READ;
      else                          ctrl_d = CTRL_WRITE;
    end
    if (start_c)     ctrl_d = CTRL_ADDR;
    else if (stop_c) ctrl_d = CTRL_IDLE;
  end

  tmr_reg #(.WIDTH(3), .RST_VAL(CTRL_IDLE)) u_ctrl (
    .clk, .rst_n, .en(1'b1), .d(ctrl_d), .seu('0), .q(ctrl_raw));
  assign ctrl_q = ctrl_e'(ctrl_raw);

  // -------------------------------------------------------- address cycle
  typedef enum logic [2:0] {
    AD_IDLE, AD_WAIT_LOW, AD_WAIT_HIGH, AD_ACK_WAIT_LOW, AD_ACK_HIGH, AD_ACK_END
  } ad_e;
  ad_e        ad_q, ad_d;
  logic [2:0] ad_raw;
  logic [7:0] addr_sh_d;
  logic [2:0] ad_cnt, ad_cnt_d;
  logic       addr_done_d;

  always_comb begin
    ad_d        = ad_q;
    addr_sh_d   = addr_sh;
    ad_cnt_d    = ad_cnt;
    addr_done_d = 1'b0;
    unique case (ad_q)
      AD_IDLE: ;
      AD_WAIT_LOW:     if (!scl_s) ad_d = AD_WAIT_HIGH;
      AD_WAIT_HIGH:
        if (scl_s) begin
          addr_sh_d = {addr_sh[6:0], sda_s};
          ad_cnt_d  = ad_cnt + 1'b1;
          ad_d      = (ad_cnt == 3'd7) ? AD_ACK_WAIT_LOW : AD_WAIT_LOW;
        end
      AD_ACK_WAIT_LOW: if (!scl_s) ad_d = AD_ACK_HIGH;
      AD_ACK_HIGH:     if (scl_s)  ad_d = AD_ACK_END;
      AD_ACK_END:
        if (!scl_s) begin
          ad_d        = AD_IDLE;
          addr_done_d = 1'b1;
        end
      default:         ad_d = AD_IDLE;
    endcase
    if (start_c) begin                   // any start begins a new address
      ad_d     = AD_WAIT_LOW;
      ad_cnt_d = '0;
    end
  end

  tmr_reg #(.WIDTH(3), .RST_VAL(AD_IDLE)) u_ad (
    .clk, .rst_n, .en(1'b1), .d(ad_d), .seu('0), .q(ad_raw));
  assign ad_q = ad_e'(ad_raw);
  tmr_reg #(.WIDTH(8), .RST_VAL('0)) u_addr_sh (
    .clk, .rst_n, .en(1'b1), .d(addr_sh_d), .seu('0), .q(addr_sh));

  logic ack_addr_low;
  logic [2:0] preread;                   // keeps n_re high after addressing

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ad_cnt       <= '0;
      addr_done    <= 1'b0;
      ack_addr_low <= 1'b0;
      preread      <= '0;
    end else begin
      ad_cnt       <= ad_cnt_d;
      addr_done    <= addr_done_d;
      ack_addr_low <= (ad_q == AD_ACK_HIGH || ad_q == AD_ACK_END) &&
                      (addr_sh[7:1] == dev_addr);
      preread      <= {preread[1:0], addr_done};
    end
  end

  // ---------------------------------------------------------- write cycle
  typedef enum logic [2:0] {
    W_IDLE, W_WAIT_HIGH, W_WAIT_LOW, W_ACK_BEGIN, W_ACK_END
  } wr_e;
  wr_e        wr_q, wr_d;
  logic [2:0] wr_raw;
  logic [7:0] wr_sh, wr_sh_d;
  logic [2:0] wr_cnt, wr_cnt_d;
  logic       byte_done_d;

  always_comb begin
    wr_d        = wr_q;
    wr_sh_d     = wr_sh;
    wr_cnt_d    = wr_cnt;
    byte_done_d = 1'b0;
    if (ctrl_q != CTRL_WRITE) begin
      wr_d = W_IDLE;
    end else begin
      unique case (wr_q)
        W_IDLE: begin
          wr_d     = W_WAIT_HIGH;
          wr_cnt_d = '0;
        end
        W_WAIT_HIGH:
          if (scl_s) begin
            wr_sh_d = {wr_sh[6:0], sda_s};
            wr_d    = W_WAIT_LOW;
          end
        W_WAIT_LOW:
          if (!scl_s) begin
            if (wr_cnt == 3'd7) wr_d = W_ACK_BEGIN;
            else begin
              wr_cnt_d = wr_cnt + 1'b1;
              wr_d     = W_WAIT_HIGH;
            end
          end
        W_ACK_BEGIN: if (scl_s) wr_d = W_ACK_END;
        W_ACK_END:
          if (!scl_s) begin
            wr_d        = W_WAIT_HIGH;
            wr_cnt_d    = '0;
            byte_done_d = 1'b1;
          end
        default: wr_d = W_IDLE;
      endcase
    end
  end

  tmr_reg #(.WIDTH(3), .RST_VAL(W_IDLE)) u_wr (
    .clk, .rst_n, .en(1'b1), .d(wr_d), .seu('0), .q(wr_raw));
  assign wr_q = wr_e'(wr_raw);
  tmr_reg #(.WIDTH(8), .RST_VAL('0)) u_wr_sh (
    .clk, .rst_n, .en(1'b1), .d(wr_sh_d), .seu('0), .q(wr_sh));
  tmr_reg #(.WIDTH(1), .RST_VAL(1'b0)) u_rx_valid (
    .clk, .rst_n, .en(1'b1), .d(byte_done_d), .seu('0), .q(rx_valid));

  logic ack_wr_low;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cnt     <= '0;
      rx_data    <= '0;
      ack_wr_low <= 1'b0;
    end else begin
      wr_cnt     <= wr_cnt_d;
      if (byte_done_d) rx_data <= wr_sh;
      ack_wr_low <= (wr_q == W_ACK_BEGIN || wr_q == W_ACK_END);
    end
  end

  // ----------------------------------------------------- transmit FIFO
  logic       fifo_rd, fifo_empty, fifo_full;
  logic [7:0] fifo_q;
  logic [$clog2(FIFO_DEPTH):0] fifo_level;

  i2c_tx_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n(rst_n & fifo_rst_n),
    .wr_en(tx_push), .wr_data(tx_data),
    .rd_en(fifo_rd), .rd_data(fifo_q),
    .full(fifo_full), .empty(fifo_empty), .level(fifo_level));

  // ----------------------------------------------------------- read cycle
  typedef enum logic [2:0] {
    R_IDLE, R_FETCH, R_PUT_BIT, R_WAIT_LOW, R_ACK_BEGIN, R_ACK_END, R_WAIT_STOP
  } rd_e;
  rd_e        rd_q, rd_d;
  logic [2:0] rd_raw;
  logic [7:0] rd_sh, rd_sh_d;
  logic [2:0] rd_cnt, rd_cnt_d;
  logic       nack;

  always_comb begin
    rd_d     = rd_q;
    rd_sh_d  = rd_sh;
    rd_cnt_d = rd_cnt;
    fifo_rd  = 1'b0;
    if (ctrl_q != CTRL_READ) begin
      rd_d = R_IDLE;
    end else begin
      unique case (rd_q)
        R_IDLE: begin
          fifo_rd = 1'b1;
          rd_d    = R_FETCH;
        end
        R_FETCH: begin
          rd_sh_d  = fifo_q;
          rd_cnt_d = '0;
          rd_d     = R_PUT_BIT;
        end
        R_PUT_BIT:
          if (scl_s) begin
            rd_sh_d = {rd_sh[6:0], 1'b0};
            rd_d    = R_WAIT_LOW;
          end
        R_WAIT_LOW:
          if (!scl_s) begin
            if (rd_cnt == 3'd7) rd_d = R_ACK_BEGIN;
            else begin
              rd_cnt_d = rd_cnt + 1'b1;
              rd_d     = R_PUT_BIT;
            end
          end
        R_ACK_BEGIN: if (scl_s) rd_d = R_ACK_END;
        R_ACK_END:
          if (!scl_s) begin
            if (nack) rd_d = R_WAIT_STOP;
            else begin
              fifo_rd = 1'b1;
              rd_d    = R_FETCH;
            end
          end
        R_WAIT_STOP: ;
        default: rd_d = R_IDLE;
      endcase
    end
  end

  tmr_reg #(.WIDTH(3), .RST_VAL(R_IDLE)) u_rd (
    .clk, .rst_n, .en(1'b1), .d(rd_d), .seu('0), .q(rd_raw));
  assign rd_q = rd_e'(rd_raw);
  tmr_reg #(.WIDTH(8), .RST_VAL('0)) u_rd_sh (
    .clk, .rst_n, .en(1'b1), .d(rd_sh_d), .seu('0), .q(rd_sh));

  logic rd_low, rd_dir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_cnt <= '0;
      nack   <= 1'b0;
      rd_low <= 1'b0;
      rd_dir <= 1'b0;
    end else begin
      rd_cnt <= rd_cnt_d;
      if (rd_q == R_ACK_END && scl_s) nack <= sda_s;
      unique case (rd_q)
        R_PUT_BIT:  rd_low <= ~rd_sh[7];
        R_WAIT_LOW: rd_low <= rd_low;
        default:    rd_low <= 1'b0;
      endcase
      rd_dir <= (rd_q == R_FETCH || rd_q == R_PUT_BIT || rd_q == R_WAIT_LOW);
    end
  end

  // ------------------------------------------------------------ pin drive
  assign sda_drive_low = ack_addr_low | ack_wr_low | rd_low;
  assign n_re          = ack_addr_low | ack_wr_low | rd_dir | (|preread);

  // a byte is never pushed into a full FIFO by the controller
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) tx_push |-> !fifo_full;
  endproperty
  a_no_overflow: assert property (p_no_overflow);

endmodule
