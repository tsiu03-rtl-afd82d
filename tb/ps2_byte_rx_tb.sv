// ps2_byte_rx_tb: checks the self-resetting 10-bit shift register that
// turns PS/2 bits into bytes.
//
// The testbench drives bit/bit_en directly, one bit every few cycles,
// with whole 11-bit frames (start 0, data LSB first, parity, stop 1) of
// random bytes, and random parity bits. For each frame it checks that
// ps2_byte_en rises exactly once, in the cycle right after the tenth
// bit_en, stays high one cycle only, and that ps2_byte then equals the
// byte sent. It also checks that nothing is reported during the first
// nine bits or for the stop bit, and that reset in the middle of a frame
// discards the partial frame.
module ps2_byte_rx_tb;

  import kb_pkg::*;

  logic      clk = 1'b0;
  logic      rstn = 1'b0;
  logic      ps2_bit = 1'b1, ps2_bit_en = 1'b0;
  ps2_byte_t ps2_byte;
  logic      ps2_byte_en;

  int checks = 0, failures = 0;

  ps2_byte_rx dut (.*);

  always #100ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  int byte_en_count = 0;
  always @(posedge clk) if (ps2_byte_en) byte_en_count++;

  // Drive one bit: enable for one cycle. Returns at the falling clock edge
  // after the rising edge that consumed the enable.
  task automatic put_bit(input logic b);
    @(negedge clk);
    ps2_bit    = b;
    ps2_bit_en = 1'b1;
    @(negedge clk);
    ps2_bit_en = 1'b0;
    ps2_bit    = 1'($urandom);
  endtask

  task automatic send_frame(input ps2_byte_t b, input logic parity);
    logic [10:0] frame;
    int count_before;
    frame  = {1'b1, parity, b, 1'b0};
    count_before = byte_en_count;
    for (int i = 0; i < 9; i++) begin
      put_bit(frame[i]);
      check(!ps2_byte_en, "no byte before the tenth bit");
      repeat ($urandom_range(0, 5)) begin
        @(negedge clk);
        check(!ps2_byte_en, "no byte between bits");
      end
    end
    put_bit(frame[9]);            // parity bit: now at negedge after it
    check(ps2_byte_en, "byte_en in the cycle after the tenth bit");
    check(ps2_byte == b, $sformatf("byte %02h expected, got %02h", b, ps2_byte));
    @(negedge clk);
    check(!ps2_byte_en, "byte_en lasts one cycle");
    repeat ($urandom_range(0, 5)) @(negedge clk);
    put_bit(frame[10]);           // stop bit
    repeat (3) begin
      @(negedge clk);
      check(!ps2_byte_en, "stop bit reports nothing");
    end
    check(byte_en_count == count_before + 1, "exactly one byte_en per frame");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(!ps2_byte_en, "idle after reset");
    rstn = 1'b1;
    send_frame(8'h16, 1'b0);
    send_frame(8'hE0, 1'b0);
    send_frame(8'hF0, 1'b1);
    send_frame(8'h00, 1'b1);
    send_frame(8'hFF, 1'b1);
    for (int n = 0; n < 40; n++)
      send_frame(8'($urandom), 1'($urandom));
    // Reset in the middle of a frame: the partial frame is lost, and a
    // new frame is received correctly.
    put_bit(1'b0);
    put_bit(1'b1);
    put_bit(1'b0);
    rstn = 1'b0;
    @(negedge clk);
    rstn = 1'b1;
    for (int i = 0; i < 7; i++) begin
      put_bit(1'b1);
      check(!ps2_byte_en, "no byte from a frame cut by reset");
    end
    send_frame(8'h5A, 1'b1);
    $display("bytes=%0d", byte_en_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
