// scancode_asm_tb: checks that prefix bytes E0 and F0 become flags and
// that each complete scan code is reported once, as {F0, E0, byte}.
//
// Byte sequences of make and break codes with and without the E0 prefix
// (left/right Ctrl, keypad 4/left arrow, digit keys) are fed in as
// one-cycle byte enables with gaps between them. After every byte the
// testbench compares scancode and scancode_en with what a reference
// model kept in the testbench expects: no report for a prefix byte, a
// one-cycle report in the cycle after the final byte, and the value held
// until the next scan code.
module scancode_asm_tb;

  import kb_pkg::*;

  logic      clk = 1'b0;
  logic      rstn = 1'b0;
  ps2_byte_t ps2_byte = '0;
  logic      ps2_byte_en = 1'b0;
  scancode_t scancode;
  logic      scancode_en;

  int checks = 0, failures = 0;
  int reports = 0, e0_reports = 0, f0_reports = 0;
  logic [9:0] expected = '0;
  logic       ref_e0 = 1'b0, ref_f0 = 1'b0;

  scancode_asm dut (.*);

  always #100ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic put_byte(input logic [7:0] b);
    bit final_byte;
    @(negedge clk);
    ps2_byte    = b;
    ps2_byte_en = 1'b1;
    final_byte  = (b != 8'hE0) && (b != 8'hF0);
    if (b == 8'hE0) ref_e0 = 1'b1;
    if (b == 8'hF0) ref_f0 = 1'b1;
    if (final_byte) begin
      expected = {ref_f0, ref_e0, b};
      ref_e0 = 1'b0;
      ref_f0 = 1'b0;
    end
    @(negedge clk);
    ps2_byte_en = 1'b0;
    ps2_byte    = 8'($urandom);
    check(scancode_en == final_byte, $sformatf("scancode_en after byte %02h", b));
    check(scancode == expected,
          $sformatf("scancode %03h expected, got %03h", expected, scancode));
    if (scancode_en) begin
      reports++;
      if (scancode.e0) e0_reports++;
      if (scancode.f0) f0_reports++;
    end
    repeat ($urandom_range(1, 4)) begin
      @(negedge clk);
      check(!scancode_en, "scancode_en lasts one cycle");
      check(scancode == expected, "scancode held between codes");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(scancode == '0 && !scancode_en, "reset values");
    rstn = 1'b1;
    // Table of codes: key 1, P, keypad 4, left arrow, keypad 3, page down,
    // left ctrl, right ctrl; make then break.
    put_byte(8'h16); put_byte(8'hF0); put_byte(8'h16);
    put_byte(8'h4D); put_byte(8'hF0); put_byte(8'h4D);
    put_byte(8'h6B); put_byte(8'hF0); put_byte(8'h6B);
    put_byte(8'hE0); put_byte(8'h6B); put_byte(8'hE0); put_byte(8'hF0); put_byte(8'h6B);
    put_byte(8'h7A); put_byte(8'hF0); put_byte(8'h7A);
    put_byte(8'hE0); put_byte(8'h7A); put_byte(8'hE0); put_byte(8'hF0); put_byte(8'h7A);
    put_byte(8'h14); put_byte(8'hF0); put_byte(8'h14);
    put_byte(8'hE0); put_byte(8'h14); put_byte(8'hE0); put_byte(8'hF0); put_byte(8'h14);
    // Random mix with prefixes.
    for (int n = 0; n < 200; n++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r == 0)      put_byte(8'hE0);
      else if (r == 1) put_byte(8'hF0);
      else             put_byte(8'($urandom_range(0, 8'hDF)));
    end
    check(e0_reports > 0 && f0_reports > 0, "E0 and F0 flags both reported");
    $display("reports=%0d e0=%0d f0=%0d", reports, e0_reports, f0_reports);
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
