// ps2_keyboard_model: behavioural model of a PS/2 keyboard sending to the
// host. Not synthesizable; used by the testbenches only.
//
// Both lines idle high. send_byte() transmits one frame of eleven bits:
// start bit 0, eight data bits LSB first, odd parity, stop bit 1. For each
// bit the model puts the bit on ps2_dat, lets it settle for a quarter of
// the PS/2 clock period, pulls ps2_clk low for half a period and releases
// it for the last quarter, so the data is stable around every falling
// flank. PERIOD_NS is the PS/2 clock period (50..100 us on a real
// keyboard). falls counts falling flanks of ps2_clk since time 0, and
// last_fall_bit gives the position (0..10) in its frame of the bit that
// the most recent flank carried; both are updated just before the flank. A frame may be sent with a wrong parity
// bit to show that the receiver ignores it.
module ps2_keyboard_model #(
  parameter int unsigned PERIOD_NS = 50_000
) (
  output logic ps2_clk,
  output logic ps2_dat
);

  int unsigned falls = 0;
  int          last_fall_bit = -1;

  initial begin
    ps2_clk = 1'b1;
    ps2_dat = 1'b1;
  end

  task automatic send_frame(input logic [10:0] frame);
    for (int i = 0; i <= 10; i++) begin
      ps2_dat = frame[i];
      #((PERIOD_NS / 4) * 1ns);
      falls++;
      last_fall_bit = i;
      ps2_clk = 1'b0;
      #((PERIOD_NS / 2) * 1ns);
      ps2_clk = 1'b1;
      #((PERIOD_NS / 4) * 1ns);
    end
    ps2_dat = 1'b1;
  endtask

  task automatic send_byte(input logic [7:0] b, input bit bad_parity = 1'b0);
    logic parity;
    parity = ~(^b) ^ bad_parity;     // odd parity over data + parity bit
    send_frame({1'b1, parity, b, 1'b0});
  endtask

  // Idle bus for a number of microseconds (between bytes and codes).
  task automatic idle(input int unsigned us);
    repeat (us) #1us;
  endtask

endmodule
