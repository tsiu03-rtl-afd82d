// scancode_to_seg7_tb: exhaustive check of the scan-code to 7-segment
// decoder over all 256 byte values.
//
// The expected pattern is built here from scratch: a table of which
// segments are lit for each digit (segment 0 top, 1 upper right, 2 lower
// right, 3 bottom, 4 lower left, 5 upper left, 6 middle), turned into an
// active-low vector, and a table of the set-2 make codes of keys 0..9.
// Every other byte must show "E" (segments 0, 3, 4, 5, 6 lit).
module scancode_to_seg7_tb;

  import kb_pkg::*;

  logic [7:0] code;
  seg7_t      seg;

  int checks = 0, failures = 0;

  scancode_to_seg7 dut (.code(code), .seg(seg));

  // Lit segments per digit, as lists of segment numbers.
  function automatic logic [6:0] lit(input string segs);
    logic [6:0] v = '1;              // all dark
    for (int i = 0; i < segs.len(); i++)
      v[3'(segs[i] - "0")] = 1'b0;       // active low
    return v;
  endfunction

  string digit_segs [10] = '{"012345", "12", "01346", "01236", "1256",
                             "02356", "023456", "012", "0123456", "012356"};
  logic [7:0] key_code [10] = '{8'h45, 8'h16, 8'h1E, 8'h26, 8'h25,
                                8'h2E, 8'h36, 8'h3D, 8'h3E, 8'h46};

  initial begin
    automatic int digits_seen = 0;
    for (int c = 0; c < 256; c++) begin
      logic [6:0] exp_seg;
      exp_seg = lit("03456");        // "E"
      for (int d = 0; d < 10; d++)
        if (key_code[d] == 8'(c)) begin
          exp_seg = lit(digit_segs[d]);
          digits_seen++;
        end
      code = 8'(c);
      #10ns;
      checks++;
      if (seg !== exp_seg) begin
        failures++;
        $display("FAIL code %02h: expected %07b got %07b", c, exp_seg, seg);
      end
    end
    checks++;
    if (digits_seen != 10) failures++;
    // The figure's example: digit 5 is "0010010" (HEX6 .. HEX0).
    code = 8'h2E;
    #10ns;
    checks++;
    if (seg !== 7'b0010010) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
