// LED blinker for the board bring-up example: two LEDs that light
// alternately, slow enough to be seen.
//
// A free-running DIV_BITS-bit counter divides the board clock; its most
// significant bit is the slow square wave. LED 0 follows that bit and LED 1
// its complement, so exactly one LED is lit and they change over every
// 2^(DIV_BITS-1) clocks; a full on/off period is 2^DIV_BITS clocks. With the
// board's 27 MHz clock and the default 22 bits that is 27e6 / 2^22 = 6.4 Hz.
// The 22-bit divider and the alternating LEDs follow the source example; it
// uses the counter bit directly as a clock for the rest of the design,
// whereas here everything stays on the board clock and the LEDs are
// registered outputs (this design's choice), and led_toggle pulses for one
// clock whenever the LEDs change over.
//
// Interface: clk, asynchronous active-high rst (counter cleared, LED 1 lit),
// led[1:0] (1 = lit), led_toggle.
module led_blinker #(
  parameter int unsigned DIV_BITS = 22
) (
  input  logic       clk,
  input  logic       rst,
  output logic [1:0] led,
  output logic       led_toggle
);
  logic [DIV_BITS-1:0] count;
  logic                slow;

  assign slow = count[DIV_BITS-1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count      <= '0;
      led        <= 2'b10;
      led_toggle <= 1'b0;
    end else begin
      count      <= count + 1'b1;
      led        <= {~slow, slow};
      led_toggle <= (led[0] != slow);
    end
  end
endmodule
