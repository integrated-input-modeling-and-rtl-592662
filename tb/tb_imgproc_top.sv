// End-to-end testbench of imgproc_top at reduced sizes: 36 x 5 gesture frames
// (45 words per image, so every frame ends with a single write after eleven
// 4-word bursts), Contour read bursts of up to 16 words, and 16 x 10
// motion-detection frames, and a 10-bit LED divider. See imgproc_env for what it drives and checks.
module tb_imgproc_top;
  imgproc_env #(.FULL(1'b0), .FW(36), .FH(5), .MDW(16), .MDH(10), .RD_MAXLEN(16),
                .VFRAMES(4), .MDFRAMES(3), .LED_DIV(10)) env ();
endmodule
