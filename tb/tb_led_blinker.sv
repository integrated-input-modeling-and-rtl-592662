// Testbench for led_blinker with a 5-bit divider: checks after reset that
// exactly one LED is lit at every clock, that the LEDs change over exactly
// every 2^(DIV_BITS-1) clocks with led_toggle marking each change, and that
// the first change comes 2^(DIV_BITS-1) + 1 clocks after reset is released.
module tb_led_blinker;
  localparam int DIV_BITS = 5, HALF = 1 << (DIV_BITS - 1);

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] led;
  logic       tog;
  led_blinker #(.DIV_BITS(DIV_BITS)) dut (.clk, .rst, .led, .led_toggle(tog));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last_change, changes;
    logic [1:0] prev;
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(negedge clk);
    check(led == 2'b10, "LED 1 lit after reset");
    prev = led; cyc = 0; last_change = 0; changes = 0;
    for (int i = 0; i < 10 * HALF; i++) begin
      @(negedge clk);
      cyc++;
      check(led == 2'b01 || led == 2'b10, $sformatf("exactly one LED lit, led=%b", led));
      check(tog == (led != prev), "led_toggle marks a change");
      if (led != prev) begin
        if (changes == 0) check(cyc == HALF + 1, $sformatf("first change after %0d clocks", cyc));
        else check(cyc - last_change == HALF, $sformatf("change interval %0d", cyc - last_change));
        last_change = cyc;
        changes++;
      end
      prev = led;
    end
    check(changes == 9 || changes == 10, $sformatf("changes %0d", changes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
