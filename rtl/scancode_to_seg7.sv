// scancode_to_seg7: decodes a scan-code byte into the 7-segment pattern of
// the digit key it belongs to.
//
// Purely combinational. The make codes (scan-code set 2) of the keys 0..9
// above the letters map to the active-low pattern of that digit; every
// other byte, including prefix bytes and the codes of the numeric keypad,
// shows the letter "E". The code table and the patterns are the lab's.
// Only the byte is looked at: a break code of a digit key (F0 prefix)
// shows the same digit as its make code.
module scancode_to_seg7
  import kb_pkg::*;
(
  input  ps2_byte_t code,   // scan-code byte
  output seg7_t     seg     // active low, seg[i] drives segment i
);

  always_comb begin
    unique case (code)
      SC_KEY_1: seg = SEG_1;
      SC_KEY_2: seg = SEG_2;
      SC_KEY_3: seg = SEG_3;
      SC_KEY_4: seg = SEG_4;
      SC_KEY_5: seg = SEG_5;
      SC_KEY_6: seg = SEG_6;
      SC_KEY_7: seg = SEG_7;
      SC_KEY_8: seg = SEG_8;
      SC_KEY_9: seg = SEG_9;
      SC_KEY_0: seg = SEG_0;
      default:  seg = SEG_E;
    endcase
  end

endmodule
