// digit_to_seg7: encodes a decimal digit as an active-low 7-segment
// pattern.
//
// Purely combinational. Digits 0..9 give the same patterns as the digit
// keys do on the number display; inputs 10..15 are not digits and show
// "E". The design uses it for the two displays that show the group number,
// fed with constant digits. The patterns are the lab's; making them a
// separate encoder rather than two hard-wired constants is this design's
// choice.
module digit_to_seg7
  import kb_pkg::*;
(
  input  logic [3:0] digit,   // 0..9
  output seg7_t      seg      // active low, seg[i] drives segment i
);

  always_comb begin
    unique case (digit)
      4'd0:    seg = SEG_0;
      4'd1:    seg = SEG_1;
      4'd2:    seg = SEG_2;
      4'd3:    seg = SEG_3;
      4'd4:    seg = SEG_4;
      4'd5:    seg = SEG_5;
      4'd6:    seg = SEG_6;
      4'd7:    seg = SEG_7;
      4'd8:    seg = SEG_8;
      4'd9:    seg = SEG_9;
      default: seg = SEG_E;
    endcase
  end

endmodule
