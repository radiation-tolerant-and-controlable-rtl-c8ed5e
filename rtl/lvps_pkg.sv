// lvps_pkg: constants and types shared by the regulators-board controller.
//
// The controller sits on a low-voltage power-supply board that feeds seven
// front-end boards. A remote control board talks to it over I2C with
// one-byte commands. This package holds the command codes, the regulator
// inhibit patterns, the identification string returned by the ID command,
// and the table that turns an analog channel number into the select and
// enable pins of the analog multiplexers.
//
// Taken from the document: the command codes 0xFA..0xFE, the 24 inhibit
// outputs and the "first front-end board" inhibit pattern, the ID text,
// the 10-bit ADC word and its two-byte reply format, the 200-cycle ADC
// settling wait, and the multiplexer-enable table. Choices of this design:
// the enable word is 12 bits wide (see mux_enable below) and the ID reply
// is the text followed by exactly one NUL byte.
package lvps_pkg;

  // ---- I2C command bytes ------------------------------------------------
  localparam logic [7:0] CMD_ID             = 8'hFA; // return ID string
  localparam logic [7:0] CMD_POWER_UP       = 8'hFB; // all regulators on
  localparam logic [7:0] CMD_POWER_DOWN     = 8'hFC; // all regulators off
  localparam logic [7:0] CMD_POWER_UP_FIRST = 8'hFD; // first board only
  localparam logic [7:0] CMD_READ_CHANNEL   = 8'hFE; // next byte = channel

  // ---- regulator inhibit outputs (1 = regulator inhibited / off) --------
  localparam int unsigned N_INHIBIT = 24;
  localparam logic [N_INHIBIT-1:0] INHIBIT_ALL_OFF   = '1;
  localparam logic [N_INHIBIT-1:0] INHIBIT_ALL_ON    = '0;
  localparam logic [N_INHIBIT-1:0] INHIBIT_FIRST_VFE = 24'b1111_1111_0001_0011_0111_1110;

  // ---- identification reply ---------------------------------------------
  localparam int unsigned ID_LEN = 31;
  localparam logic [8*ID_LEN-1:0] ID_TEXT = "LVPS Regulators Board fw. v0.02";
  // bytes pushed for one ID command: the text plus a terminating NUL
  localparam int unsigned ID_BYTES = ID_LEN + 1;

  // Character number idx (0 = first) of the reply; NUL past the text.
  function automatic logic [7:0] id_byte(input logic [5:0] idx);
    if (idx < 6'(ID_LEN))
      return ID_TEXT[8*(ID_LEN-1-int'(idx)) +: 8];
    return 8'h00;
  endfunction

  // ---- ADC and analog channel readout -----------------------------------
  localparam int unsigned ADC_W      = 10;
  localparam int unsigned READ_BYTES = 2;   // 10-bit sample split in two
  localparam int unsigned MUX_EN_W   = 12;  // multiplexer enable pins
  localparam int unsigned MUX_SEL_W  = 3;   // shared A/B/C select pins

  // Reply byte number idx of a channel read: first D9,D8 in bits 7:6,
  // then D7..D0.
  function automatic logic [7:0] read_byte(input logic [ADC_W-1:0] d,
                                           input logic [5:0] idx);
    if (idx == 6'd0) return {d[9:8], 6'b0};
    return d[7:0];
  endfunction

  // Enable pattern (active low) for channel group ch[6:3]. Groups 0..6
  // are the document's table; any other group disables every switch.
  function automatic logic [MUX_EN_W-1:0] mux_enable(input logic [3:0] grp);
    case (grp)
      4'd0:    return 12'b0000_1111_1110;
      4'd1:    return 12'b1000_1111_1011;
      4'd2:    return 12'b0010_1111_0111;
      4'd3:    return 12'b1010_1110_1111;
      4'd4:    return 12'b0001_1101_1111;
      4'd5:    return 12'b1001_1011_1111;
      4'd6:    return 12'b0011_0111_1111;
      default: return 12'b0000_1111_1111;
    endcase
  endfunction

  localparam logic [MUX_EN_W-1:0] MUX_ALL_OFF = '1;  // state after reset

endpackage
