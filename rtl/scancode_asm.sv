// scancode_asm: groups the bytes of one PS/2 scan code into a single
// 10-bit scan code with a one-cycle scancode_en.
//
// A set-2 scan code is one final byte, possibly preceded by E0 (extended
// key) and/or F0 (key released). Two flags remember which prefixes have
// been seen. On every ps2_byte_en:
//   byte == E0 : set the E0 flag
//   byte == F0 : set the F0 flag
//   otherwise  : scancode <= {F0 flag, E0 flag, byte}, clear both flags
//                and pulse scancode_en for one cycle.
// So the break code E0,F0,14 of the right Ctrl key is reported once, as
// {1,1,14h}, and the make code 16h of key 1 as {0,0,16h}. The scancode
// register holds its value until the next complete scan code.
//
// Timing: scancode and scancode_en change at the clock edge that ends the
// ps2_byte_en cycle of the final byte; scancode_en is then high for that
// one following cycle. The decision rule and the F0 & E0 & byte order are
// the lab's. The asynchronous reset (flags and scancode to zero) and the
// registered scancode_en are this design's choices.
module scancode_asm
  import kb_pkg::*;
(
  input  logic      clk,
  input  logic      rstn,         // asynchronous reset, active low
  input  ps2_byte_t ps2_byte,     // received byte
  input  logic      ps2_byte_en,  // one-cycle pulse per received byte
  output scancode_t scancode,     // last complete scan code
  output logic      scancode_en   // one-cycle pulse per new scan code
);

  logic e0_flag, f0_flag;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      e0_flag     <= 1'b0;
      f0_flag     <= 1'b0;
      scancode    <= '0;
      scancode_en <= 1'b0;
    end else begin
      scancode_en <= 1'b0;
      if (ps2_byte_en) begin
        if (ps2_byte == PS2_PREFIX_E0) begin
          e0_flag <= 1'b1;
        end else if (ps2_byte == PS2_PREFIX_F0) begin
          f0_flag <= 1'b1;
        end else begin
          scancode    <= '{f0: f0_flag, e0: e0_flag, code: ps2_byte};
          scancode_en <= 1'b1;
          e0_flag     <= 1'b0;
          f0_flag     <= 1'b0;
        end
      end
    end
  end

endmodule
