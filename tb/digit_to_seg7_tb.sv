// digit_to_seg7_tb: exhaustive check of the digit to 7-segment encoder.
//
// Expected patterns are built from a list of lit segments per digit
// (segment 0 top, 1 upper right, 2 lower right, 3 bottom, 4 lower left,
// 5 upper left, 6 middle), active low. Inputs 10..15 must show "E".
module digit_to_seg7_tb;

  import kb_pkg::*;

  logic [3:0] digit;
  seg7_t      seg;

  int checks = 0, failures = 0;

  digit_to_seg7 dut (.digit(digit), .seg(seg));

  function automatic logic [6:0] lit(input string segs);
    logic [6:0] v = '1;
    for (int i = 0; i < segs.len(); i++)
      v[3'(segs[i] - "0")] = 1'b0;
    return v;
  endfunction

  string digit_segs [10] = '{"012345", "12", "01346", "01236", "1256",
                             "02356", "023456", "012", "0123456", "012356"};

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] exp_seg;
      exp_seg = (d < 10) ? lit(digit_segs[d]) : lit("03456");
      digit = 4'(d);
      #10ns;
      checks++;
      if (seg !== exp_seg) begin
        failures++;
        $display("FAIL digit %0d: expected %07b got %07b", d, exp_seg, seg);
      end
    end
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
