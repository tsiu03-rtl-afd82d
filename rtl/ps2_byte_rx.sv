// ps2_byte_rx: assembles the serial PS/2 bits into bytes and marks each
// complete byte with a one-cycle enable.
//
// A 10-bit shift register rests at all ones. On every ps2_bit_en the new
// bit enters at the left (bit 9) and everything moves one place right, so
// the first bit of a frame, the start bit, which is always 0, walks
// towards bit 0. After the tenth bit (the parity bit) the start bit has
// reached bit 0: the data byte sits in bits 8..1, LSB first on the line
// and so LSB at the right, and the parity bit in bit 9, which is ignored.
//   ps2_byte    = shiftreg[8:1]
//   ps2_byte_en = ~shiftreg[0]
// While ps2_byte_en is high the next clock edge loads all ones again, so
// the enable lasts exactly one cycle. The stop bit, the eleventh, is
// always 1 and shifts a 1 into a register that is already all ones, so it
// leaves it unchanged and needs no counter.
//
// Timing: ps2_byte_en is high in the clock cycle after the edge that
// shifted in the parity bit, i.e. one cycle after the ps2_bit_en of the
// tenth falling PS2_CLK flank; ps2_byte is valid in that same cycle only.
// rstn resets the register to all ones asynchronously, ps2_byte_en does
// so synchronously. The whole scheme, including the reset values, is the
// lab's; giving the synchronous reset priority over a coincident shift is
// this design's choice (the two cannot coincide with a real keyboard).
// No parity or framing check is made, as in the lab.
module ps2_byte_rx
  import kb_pkg::*;
(
  input  logic      clk,
  input  logic      rstn,         // asynchronous reset, active low
  input  logic      ps2_bit,      // synchronised data bit
  input  logic      ps2_bit_en,   // one-cycle pulse per PS/2 bit
  output ps2_byte_t ps2_byte,     // received byte, valid with ps2_byte_en
  output logic      ps2_byte_en   // one-cycle pulse per received byte
);

  logic [9:0] shiftreg;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn)
      shiftreg <= '1;
    else if (ps2_byte_en)
      shiftreg <= '1;
    else if (ps2_bit_en)
      shiftreg <= {ps2_bit, shiftreg[9:1]};
  end

  assign ps2_byte    = shiftreg[8:1];
  assign ps2_byte_en = ~shiftreg[0];

endmodule
