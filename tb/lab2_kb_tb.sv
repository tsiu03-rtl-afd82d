// lab2_kb_tb: end-to-end test of the keyboard decoder at its default
// parameters, driven by a behavioural PS/2 keyboard.
//
// System clock 5 MHz, PS/2 clock 20 kHz. The test runs, in order:
//  1. the digit keys 1, 2, ..., 9, 0, one make code every 2 ms;
//  2. key 4 alone, sent with its parity bit forced to 0 and then with a
//     wrong parity bit (the receiver ignores parity);
//  3. make and break codes of key 1, P, keypad 4, left arrow, keypad 3,
//     page down, left Ctrl and right Ctrl, with and without E0/F0;
//  4. a reset after an E0 prefix, followed by a plain key, which must
//     come out without the E0 flag.
// After every scan code LEDR must equal {F0, E0, last byte} and HEX0 the
// digit (or "E"); expected 7-segment patterns are built here from lists
// of lit segments. HEX7/HEX6 must show the default group number 86.
// LEDR may change only together with scancode_en, so nothing flickers
// while bits arrive. The time from the tenth falling PS2_CLK flank of a
// final byte to scancode_en must be three rising clock edges; a prefix
// byte must give no scancode_en at all. Every mechanism (bit enable,
// byte enable, E0 flag, F0 flag, digit, "E", wrong parity, reset) is
// counted, and one that never happened counts as a failure.
module lab2_kb_tb;

  logic       clk = 1'b1;
  logic       rstn = 1'b0;
  logic       PS2_CLK, PS2_DAT;
  logic [6:0] HEX0, HEX7, HEX6;
  logic [9:0] LEDR;
  logic       scancode_en;

  int checks = 0, failures = 0;

  // Mechanism counters
  int n_bit_en = 0, n_byte_en = 0, n_scancodes = 0, n_e0 = 0, n_f0 = 0;
  int n_digit = 0, n_e_shown = 0, n_bad_parity = 0, n_reset = 0;

  lab2_kb dut (.*);

  ps2_keyboard_model #(.PERIOD_NS(50_000)) kbd (
    .ps2_clk (PS2_CLK),
    .ps2_dat (PS2_DAT)
  );

  always #100ns clk = ~clk;       // 5 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---- independent reference for the displays --------------------------
  function automatic logic [6:0] lit(input string segs);
    logic [6:0] v = '1;
    for (int i = 0; i < segs.len(); i++)
      v[3'(segs[i] - "0")] = 1'b0;
    return v;
  endfunction

  string      digit_segs [10] = '{"012345", "12", "01346", "01236", "1256",
                                  "02356", "023456", "012", "0123456", "012356"};
  logic [7:0] key_code   [10] = '{8'h45, 8'h16, 8'h1E, 8'h26, 8'h25,
                                  8'h2E, 8'h36, 8'h3D, 8'h3E, 8'h46};

  function automatic logic [6:0] expected_hex0(input logic [7:0] b);
    for (int d = 0; d < 10; d++)
      if (key_code[d] == b) return lit(digit_segs[d]);
    return lit("03456");
  endfunction

  // ---- monitors (sampled mid-cycle, away from the active edge) ---------
  always @(negedge clk) begin
    if (dut.ps2_bit_en && rstn) n_bit_en++;
    if (dut.ps2_byte_en && rstn) n_byte_en++;
    if (scancode_en && rstn) begin
      n_scancodes++;
      if (LEDR[8]) n_e0++;
      if (LEDR[9]) n_f0++;
    end
  end

  // No flicker: LEDR changes only in a cycle with scancode_en.
  logic [9:0] prev_ledr;
  logic       watching = 1'b0;
  always @(negedge clk) begin
    if (watching && rstn)
      check(LEDR == prev_ledr || scancode_en, "LEDR changed without scancode_en");
    prev_ledr <= LEDR;
  end

  // Latency from the tenth falling flank (parity bit) to scancode_en.
  bit expect_final = 1'b0;
  int n_latency = 0;
  always @(negedge PS2_CLK) begin
    if (kbd.last_fall_bit == 9 && rstn) begin
      automatic int seen_at = 0;
      automatic bit final_byte = expect_final;
      for (int n = 1; n <= 6; n++) begin
        @(posedge clk);
        #1ns;
        if (scancode_en && seen_at == 0) seen_at = n;
      end
      if (final_byte)
        check(seen_at == 3, $sformatf("scancode_en %0d edges after the flank, 3 expected", seen_at));
      else
        check(seen_at == 0, "prefix byte gave scancode_en");
      n_latency++;
    end
  end

  // ---- stimulus helpers --------------------------------------------------
  // Send one scan code (prefixes then final byte) and check the result.
  task automatic send_code(input bit e0, input bit f0, input logic [7:0] b,
                           input bit bad_parity = 1'b0);
    if (e0) begin
      expect_final = 1'b0;
      kbd.send_byte(8'hE0);
      kbd.idle(60);
    end
    if (f0) begin
      expect_final = 1'b0;
      kbd.send_byte(8'hF0);
      kbd.idle(60);
    end
    expect_final = 1'b1;
    kbd.send_byte(b, bad_parity);
    if (bad_parity) n_bad_parity++;
    kbd.idle(20);
    check(LEDR == {f0, e0, b},
          $sformatf("LEDR %03h expected, got %03h", {f0, e0, b}, LEDR));
    check(HEX0 == expected_hex0(b),
          $sformatf("HEX0 for byte %02h: %07b expected, got %07b", b, expected_hex0(b), HEX0));
    if (expected_hex0(b) == lit("03456")) n_e_shown++;
    else                                  n_digit++;
  endtask

  initial begin
    realtime t0;
    #300ns rstn = 1'b1;
    #50ns;                             // keeps PS/2 flanks off clock edges
    kbd.idle(100);
    watching = 1'b1;
    check(HEX7 == 7'b0000000, "HEX7 shows 8");
    check(HEX6 == 7'b0000010, "HEX6 shows 6");

    // 1. keys 1..9, 0, one every 2 ms
    for (int k = 1; k <= 10; k++) begin
      t0 = $realtime;
      send_code(1'b0, 1'b0, key_code[k % 10]);
      check(LEDR[7:0] == key_code[k % 10], "LEDR shows the key's byte");
      wait ($realtime >= t0 + 2ms);
    end

    // 2. key 4 alone, parity bit 0 (correct for 25h), then wrong parity
    send_code(1'b0, 1'b0, 8'h25);
    check(HEX0 == 7'b0011001, "key 4 shows 0011001");
    send_code(1'b0, 1'b0, 8'h16);
    send_code(1'b0, 1'b0, 8'h25, 1'b1);
    check(HEX0 == 7'b0011001, "key 4 with wrong parity still shown");

    // 3. make and break codes from the scan-code examples
    send_code(1'b0, 1'b0, 8'h16); send_code(1'b0, 1'b1, 8'h16);
    send_code(1'b0, 1'b0, 8'h4D); send_code(1'b0, 1'b1, 8'h4D);
    send_code(1'b0, 1'b0, 8'h6B); send_code(1'b0, 1'b1, 8'h6B);
    send_code(1'b1, 1'b0, 8'h6B); send_code(1'b1, 1'b1, 8'h6B);
    send_code(1'b0, 1'b0, 8'h7A); send_code(1'b0, 1'b1, 8'h7A);
    send_code(1'b1, 1'b0, 8'h7A); send_code(1'b1, 1'b1, 8'h7A);
    send_code(1'b0, 1'b0, 8'h14); send_code(1'b0, 1'b1, 8'h14);
    send_code(1'b1, 1'b0, 8'h14); send_code(1'b1, 1'b1, 8'h14);

    // 4. reset between the E0 prefix and the final byte: the scan code
    //    and the pending E0 flag are both cleared
    send_code(1'b0, 1'b0, 8'h46);
    expect_final = 1'b0;
    kbd.send_byte(8'hE0);
    kbd.idle(20);
    watching = 1'b0;
    rstn = 1'b0;
    #1us;
    check(LEDR == 10'h000, "reset clears the scan code");
    check(HEX0 == lit("03456"), "HEX0 shows E after reset");
    rstn = 1'b1;
    n_reset++;
    kbd.idle(40);
    watching = 1'b1;
    send_code(1'b0, 1'b0, 8'h3D);
    check(HEX0 == lit("012"), "key 7 after reset");
    check(LEDR[9:8] == 2'b00, "E0 flag cleared by reset");

    // every mechanism must have happened
    check(n_bit_en  > 0, "bit enables seen");
    check(n_byte_en > 0, "byte enables seen");
    check(n_scancodes > 0, "scancode_en seen");
    check(n_e0 > 0, "E0 flag reported");
    check(n_f0 > 0, "F0 flag reported");
    check(n_digit > 0, "digit shown");
    check(n_e_shown > 0, "E shown");
    check(n_bad_parity > 0, "wrong parity ignored");
    check(n_reset > 0, "reset during a byte");
    check(n_latency > 0, "latency measured");
    check(n_scancodes == 31 && n_e0 == 6 && n_f0 == 8, "number of scan codes reported");
    check(n_bit_en == int'(kbd.falls), "one bit enable per falling flank");
    check(n_byte_en * 11 == n_bit_en, "one byte enable per eleven flanks");
    $display("bit_en=%0d byte_en=%0d scancodes=%0d e0=%0d f0=%0d digit=%0d E=%0d bad_parity=%0d reset=%0d latency=%0d",
             n_bit_en, n_byte_en, n_scancodes, n_e0, n_f0, n_digit, n_e_shown,
             n_bad_parity, n_reset, n_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
