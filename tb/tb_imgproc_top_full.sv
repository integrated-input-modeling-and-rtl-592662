// End-to-end testbench of imgproc_top with every parameter at its default.
// Four 384 x 240 gesture frames go through the bank-swapping memory system
// with a video sample on every clock (the slowest system clock that the
// 27 MHz sample rate allows, so the frame writers see their highest load),
// three 408 x 306 frames go through motion detection, and the LED blinker
// (22-bit divider) changes over at least twice. See imgproc_env for the
// checks and the mechanisms counted.
module tb_imgproc_top_full;
  imgproc_env #(.FULL(1'b1), .FW(384), .FH(240), .MDW(408), .MDH(306), .RD_MAXLEN(256),
                .VFRAMES(4), .MDFRAMES(3), .VGAP(1)) env ();
endmodule
