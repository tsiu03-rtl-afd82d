// lab2_kb_key4_tb: single-key test of the keyboard decoder with a slow,
// asymmetric PS/2 clock.
//
// One frame for key 4 (make code 25h) is sent bit by bit: every 100 us a
// new bit is put on PS2_DAT, PS2_CLK falls 10 us later and rises 25 us
// after that. The parity bit is sent as 0, which happens to be the correct
// odd parity for 25h. The system clock is 5 MHz and reset is released
// after 300 ns. Once the frame is complete, HEX0 must read 0011001 (the
// digit 4), LEDR must hold 025h, and scancode_en must have pulsed once.
// Before the tenth falling flank nothing may have been reported.
module lab2_kb_key4_tb;

  logic       clk = 1'b1;
  logic       rstn = 1'b0;
  logic       PS2_CLK = 1'b1, PS2_DAT = 1'b1;
  logic [6:0] HEX0, HEX7, HEX6;
  logic [9:0] LEDR;
  logic       scancode_en;

  int checks = 0, failures = 0, reports = 0;

  lab2_kb dut (.*);

  always #100ns clk = ~clk;

  always @(negedge clk) if (rstn && scancode_en) reports++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // start, D0..D7 of 25h (LSB first), parity 0, stop
  localparam logic [10:0] KEY4_FRAME = {1'b1, 1'b0, 8'h25, 1'b0};

  initial begin
    #300ns rstn = 1'b1;
    #100us;
    for (int i = 0; i <= 10; i++) begin
      PS2_DAT = KEY4_FRAME[i];
      #10us PS2_CLK = 1'b0;
      #25us PS2_CLK = 1'b1;
      #65us;
      if (i < 9) check(reports == 0, "nothing reported before the parity bit");
    end
    check(reports == 1, "exactly one scan code reported");
    check(HEX0 == 7'b0011001, "HEX0 shows 4");
    check(LEDR == 10'h025, "LEDR holds 025h");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
