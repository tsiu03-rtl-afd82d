// kb_pkg: types and constants shared by the PS/2 keyboard decoder.
//
// seg7_t is one 7-segment display, bit i driving segment i (0 = top,
// 1 = upper right, 2 = lower right, 3 = bottom, 4 = lower left,
// 5 = upper left, 6 = middle). The displays are active low: a 0 lights a
// segment. The segment numbering, the polarity, the scan-code set 2 make
// codes of the keys 0..9 and their segment patterns are those of the lab
// hardware; the names of the types are this design's own.
package kb_pkg;

  typedef logic [6:0] seg7_t;
  typedef logic [7:0] ps2_byte_t;

  // A reported scan code: prefix flags plus the final byte, F0 & E0 & byte.
  typedef struct packed {
    logic      f0;     // a break prefix (F0) preceded the byte
    logic      e0;     // an extended prefix (E0) preceded the byte
    ps2_byte_t code;   // the last byte of the scan code
  } scancode_t;

  // Prefix bytes of scan-code set 2.
  localparam ps2_byte_t PS2_PREFIX_E0 = 8'hE0;
  localparam ps2_byte_t PS2_PREFIX_F0 = 8'hF0;

  // Make codes of the digit keys above the letters (set 2).
  localparam ps2_byte_t SC_KEY_0 = 8'h45;
  localparam ps2_byte_t SC_KEY_1 = 8'h16;
  localparam ps2_byte_t SC_KEY_2 = 8'h1E;
  localparam ps2_byte_t SC_KEY_3 = 8'h26;
  localparam ps2_byte_t SC_KEY_4 = 8'h25;
  localparam ps2_byte_t SC_KEY_5 = 8'h2E;
  localparam ps2_byte_t SC_KEY_6 = 8'h36;
  localparam ps2_byte_t SC_KEY_7 = 8'h3D;
  localparam ps2_byte_t SC_KEY_8 = 8'h3E;
  localparam ps2_byte_t SC_KEY_9 = 8'h46;

  // Active-low segment patterns, written HEX(6) .. HEX(0).
  localparam seg7_t SEG_0 = 7'b1000000;
  localparam seg7_t SEG_1 = 7'b1111001;
  localparam seg7_t SEG_2 = 7'b0100100;
  localparam seg7_t SEG_3 = 7'b0110000;
  localparam seg7_t SEG_4 = 7'b0011001;
  localparam seg7_t SEG_5 = 7'b0010010;
  localparam seg7_t SEG_6 = 7'b0000010;
  localparam seg7_t SEG_7 = 7'b1111000;
  localparam seg7_t SEG_8 = 7'b0000000;
  localparam seg7_t SEG_9 = 7'b0010000;
  localparam seg7_t SEG_E = 7'b0000110;

endpackage
