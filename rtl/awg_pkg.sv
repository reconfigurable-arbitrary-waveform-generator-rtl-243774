// Shared types and constants of the arbitrary waveform generator.
//
// The generator is controlled from a PC over a serial link: every byte the
// UART receives is a command ("code word"). Only one code word is fixed by
// the original design, 8'b1001_0000, which selects the triangular waveform;
// the rest of the encoding below is this design's own choice, built around
// that one code:
//   8'h80 sawtooth, 8'h90 triangular, 8'hA0 staircase   (bit 7 = waveform)
//   8'h40, 8'h41, 8'h42  square-wave clock division by 2, 7, 15
//   8'h20 .. 8'h28       baud rate 110, 300, 600, 1200, 2400, 9600,
//                        14400, 19200, 28800 (the rates the PC program offers)
// Unknown codes are ignored.
package awg_pkg;

  // Width of the DAC input bus (12-bit DAC).
  localparam int unsigned DAC_W = 12;

  // Width of the baud generator's divide-ratio bus (CNT_LIMIT).
  localparam int unsigned BAUD_CNT_W = 16;

  typedef enum logic [1:0] {
    WAVE_SAW   = 2'd0,
    WAVE_TRI   = 2'd1,
    WAVE_STAIR = 2'd2
  } wave_sel_e;

  // Receiver states, one per bit of the frame.
  typedef enum logic [3:0] {
    RX_IDLE, RX_B0, RX_B1, RX_B2, RX_B3, RX_B4, RX_B5, RX_B6, RX_B7,
    RX_PARITY, RX_STOP
  } rx_state_e;

  localparam logic [7:0] CMD_SAW   = 8'h80;
  localparam logic [7:0] CMD_TRI   = 8'h90;
  localparam logic [7:0] CMD_STAIR = 8'hA0;
  localparam logic [3:0] CMD_BAUD_NIBBLE = 4'h2;
  localparam logic [3:0] CMD_DIV_NIBBLE  = 4'h4;
  localparam int unsigned NUM_BAUD = 9;
  localparam int unsigned NUM_DIV  = 3;

  // Baud rate of index i (0..NUM_BAUD-1).
  function automatic int unsigned baud_rate(input int unsigned i);
    case (i)
      0: return 110;
      1: return 300;
      2: return 600;
      3: return 1200;
      4: return 2400;
      5: return 9600;
      6: return 14400;
      7: return 19200;
      default: return 28800;
    endcase
  endfunction

  // Divide ratio for the baud generator: clock / rate, kept within the
  // generator's range 2 .. 2^16-1.
  function automatic logic [BAUD_CNT_W-1:0] calc_baud_limit(input int unsigned clk_hz,
                                                           input int unsigned rate);
    int unsigned q;
    q = clk_hz / rate;
    if (q < 2) q = 2;
    if (q > 65535) q = 65535;
    return BAUD_CNT_W'(q);
  endfunction

  // Square-wave clock division of index i (0..NUM_DIV-1).
  function automatic logic [3:0] sq_div_of(input int unsigned i);
    case (i)
      0: return 4'd2;
      1: return 4'd7;
      default: return 4'd15;
    endcase
  endfunction

endpackage
