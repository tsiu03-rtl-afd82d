// ps2_sync_tb: checks the PS/2 input synchroniser and falling-flank
// detector against a cycle model kept in the testbench.
//
// The PS/2 lines are driven between clock edges with a random pattern of
// long and short pulses. At every rising clock edge the testbench records
// what it had driven; the enable must then equal "line was 1 two samples
// ago and is 0 one sample ago", the bit must equal the data sampled one
// edge earlier, and the number of enables must equal the number of falling
// flanks driven. The first enable after a flank must come in the cycle
// after the first edge that saw the flank.
module ps2_sync_tb;

  logic clk = 1'b0;
  logic ps2_clk, ps2_dat;
  logic ps2_bit, ps2_bit_en;

  int checks = 0, failures = 0;
  int falls_driven = 0, enables_seen = 0;
  logic s1_clk, s2_clk, s1_dat;   // reference samples (1 and 2 edges ago)
  int   cycle = 0;

  ps2_sync dut (
    .clk        (clk),
    .ps2_clk    (ps2_clk),
    .ps2_dat    (ps2_dat),
    .ps2_bit    (ps2_bit),
    .ps2_bit_en (ps2_bit_en)
  );

  always #100ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // Reference samples at each rising edge; compare just before the next.
  always @(posedge clk) begin
    cycle++;
    s2_clk <= s1_clk;
    s1_clk <= ps2_clk;
    s1_dat <= ps2_dat;
  end

  always @(negedge clk) begin
    if (cycle > 3) begin
      check(ps2_bit_en == (s2_clk & ~s1_clk), "bit_en vs reference");
      check(ps2_bit == s1_dat, "bit vs reference");
      if (ps2_bit_en) enables_seen++;
    end
  end

  initial begin
    ps2_clk = 1'b1;
    ps2_dat = 1'b1;
    repeat (4) @(negedge clk);
    // Long and short high/low phases; lines change half-way between edges.
    for (int n = 0; n < 400; n++) begin
      int unsigned len;
      len = ($urandom_range(0, 3) == 0) ? 1 : $urandom_range(2, 12);
      if (ps2_clk) falls_driven++;
      ps2_clk = ~ps2_clk;
      ps2_dat = 1'($urandom);
      repeat (len) @(negedge clk);
    end
    ps2_clk = 1'b1;
    repeat (4) @(negedge clk);
    checks++;
    if (enables_seen != falls_driven) begin
      failures++;
      $display("FAIL: %0d enables for %0d falling flanks", enables_seen, falls_driven);
    end
    // Latency: a flank just after an edge gives an enable after the next edge.
    @(posedge clk); #1ns ps2_clk = 1'b0;
    check(!ps2_bit_en, "no enable before the flank is sampled");
    @(posedge clk); #1ns check(ps2_bit_en, "enable in the cycle after the sampling edge");
    @(posedge clk); #1ns check(!ps2_bit_en, "enable lasts one cycle");
    $display("falls=%0d enables=%0d", falls_driven, enables_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
