// lab2_kb: PS/2 keyboard decoder. Shows the last scan code on the red
// LEDs, the last typed digit key (0..9) on a 7-segment display, and a
// two-digit group number on two more displays.
//
// Data path, one stage per clock domain step:
//   ps2_sync        PS2_CLK/PS2_DAT -> ps2_bit, ps2_bit_en (falling flank)
//   ps2_byte_rx     bits -> ps2_byte, ps2_byte_en (start bit reaches LSB)
//   scancode_asm    bytes -> scancode {F0, E0, byte}, scancode_en
//   scancode_to_seg7  scancode.code -> HEX0 (digit, or "E")
//   digit_to_seg7 x2  GROUP_NUMBER digits -> HEX7 (tens), HEX6 (units)
// LEDR[9] is the F0 (release) flag, LEDR[8] the E0 (extended) flag and
// LEDR[7:0] the last byte, so left and right Ctrl, and press and release,
// are told apart. The outputs change only once per complete scan code and
// do not flicker while bits are shifted in.
//
// Timing: with the keyboard's tenth falling PS2_CLK flank (the parity bit)
// between clk edges k-1 and k, ps2_bit_en is high after edge k, the byte
// enable after edge k+1, and LEDR/HEX0/scancode_en change at edge k+2.
// All ports, their names and widths, the 10-bit LEDR and the split into
// the three parts are the lab's; the group number is a parameter with the
// lab's example value, and scancode_en, which the lab leaves unused, is
// brought out as a port so that a consumer of key events can be attached.
// HEX7/HEX6 are constant for a given GROUP_NUMBER, as intended.
module lab2_kb
  import kb_pkg::*;
#(
  parameter int unsigned GROUP_NUMBER = 86   // 0..99, shown on HEX7/HEX6
) (
  input  logic        rstn,          // reset, active low
  input  logic        clk,           // system clock (50 MHz on the board)
  input  logic        PS2_CLK,       // PS/2 clock line
  input  logic        PS2_DAT,       // PS/2 data line
  output logic [6:0]  HEX0,          // digit of the last key, active low
  output logic [9:0]  LEDR,          // last scan code {F0, E0, byte}
  output logic [6:0]  HEX7,          // group number, tens digit
  output logic [6:0]  HEX6,          // group number, units digit
  output logic        scancode_en    // one-cycle pulse per new scan code
);

  localparam logic [3:0] GROUP_TENS  = 4'((GROUP_NUMBER / 10) % 10);
  localparam logic [3:0] GROUP_UNITS = 4'(GROUP_NUMBER % 10);

  logic      ps2_bit, ps2_bit_en;
  ps2_byte_t ps2_byte;
  logic      ps2_byte_en;
  scancode_t scancode;

  // Part 1: synchronise and detect falling flanks
  ps2_sync u_sync (
    .clk        (clk),
    .ps2_clk    (PS2_CLK),
    .ps2_dat    (PS2_DAT),
    .ps2_bit    (ps2_bit),
    .ps2_bit_en (ps2_bit_en)
  );

  // Part 2: bits to byte
  ps2_byte_rx u_byte (
    .clk         (clk),
    .rstn        (rstn),
    .ps2_bit     (ps2_bit),
    .ps2_bit_en  (ps2_bit_en),
    .ps2_byte    (ps2_byte),
    .ps2_byte_en (ps2_byte_en)
  );

  // Part 3: bytes to scan code
  scancode_asm u_scan (
    .clk         (clk),
    .rstn        (rstn),
    .ps2_byte    (ps2_byte),
    .ps2_byte_en (ps2_byte_en),
    .scancode    (scancode),
    .scancode_en (scancode_en)
  );

  assign LEDR = scancode;

  scancode_to_seg7 u_hex0 (
    .code (scancode.code),
    .seg  (HEX0)
  );

  digit_to_seg7 u_hex7 (
    .digit (GROUP_TENS),
    .seg   (HEX7)
  );

  digit_to_seg7 u_hex6 (
    .digit (GROUP_UNITS),
    .seg   (HEX6)
  );

endmodule
