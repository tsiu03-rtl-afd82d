// ps2_sync: brings the PS/2 lines into the system clock domain and turns
// every falling flank of PS2_CLK into a one-cycle bit enable.
//
// PS2_CLK and PS2_DAT each pass through one flip-flop (ps2_clk2,
// ps2_dat2). A second flip-flop keeps the previous clock sample
// (ps2_clk2_old). A falling flank is "old sample 1, new sample 0":
//   ps2_bit_en = ps2_clk2_old & ~ps2_clk2
// and ps2_bit is the synchronised data line, sampled in the same clock
// cycle as the clock line, so it carries the bit that was valid on the
// falling flank.
//
// Timing: a flank of PS2_CLK between rising edges k-1 and k of clk is
// seen in ps2_clk2 after edge k; ps2_bit_en is high for exactly the one
// cycle between edges k and k+1, and ps2_bit then holds PS2_DAT as
// sampled at edge k. The PS/2 clock is at most 20 kHz, so many system
// cycles separate two enables.
//
// The structure (one input flip-flop per line, one delay flip-flop and an
// AND with an inverted input) follows the lab's hardware figure. As there,
// these flip-flops have no reset: both lines idle high, and a few clock
// cycles of idle bus while the rest of the design is held in reset flush
// whatever they started with. The single input stage is also the lab's;
// a second stage against metastability would be this design's addition
// and is left out.
module ps2_sync (
  input  logic clk,
  input  logic ps2_clk,     // PS/2 clock line, asynchronous
  input  logic ps2_dat,     // PS/2 data line, asynchronous
  output logic ps2_bit,     // synchronised data bit (PS2_DAT2)
  output logic ps2_bit_en   // one-cycle pulse per falling PS2_CLK flank
);

  logic ps2_clk2, ps2_clk2_old, ps2_dat2;

  always_ff @(posedge clk) begin
    ps2_clk2     <= ps2_clk;
    ps2_dat2     <= ps2_dat;
    ps2_clk2_old <= ps2_clk2;
  end

  assign ps2_bit_en = ps2_clk2_old & ~ps2_clk2;
  assign ps2_bit    = ps2_dat2;

endmodule
