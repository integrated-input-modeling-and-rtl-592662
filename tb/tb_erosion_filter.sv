// Testbench for erosion_filter on small frames (the image size is a
// parameter): several random frames, a mix of zero and non-zero pixels, are
// streamed with random input gaps and random output back-pressure; each
// output frame is compared pixel by pixel with the reference erosion, side
// data must leave with its own pixel, and the end-of-frame drain (input held
// off while the last row leaves) must happen once per frame. A last frame is
// sent back-to-back with full output readiness to check one pixel per clock.
module tb_erosion_filter;
  import tb_imgref_pkg::*;

  localparam int W = 9, H = 7, FRAMES = 12;

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  logic in_valid, in_ready, out_valid, out_ready, flush;
  logic [7:0] pin, pout, sin, sout;

  erosion_filter #(.W(W), .H(H), .SIDE_W(8)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_pix(pin), .in_side(sin),
    .out_valid, .out_ready, .out_pix(pout), .out_side(sout), .out_flush(flush)
  );

  int checks = 0, failures = 0;
  int exp_p[$];
  int exp_s[$];
  int flushes = 0, changed = 0;
  bit bp = 1'b1;
  logic flush_q = 1'b0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Outputs are sampled at the falling edge; the transfer happens at the next rising edge.
  always @(negedge clk) begin
    if (!rst && out_valid && out_ready) begin
      int e, s;
      e = exp_p.pop_front();
      s = exp_s.pop_front();
      checks++;
      if (int'(pout) != e || int'(sout) != s) begin
        failures++;
        $display("FAIL: pix=%0d exp %0d side=%0d exp %0d", pout, e, sout, s);
      end
    end
    if (flush && !flush_q) flushes++;
    flush_q <= flush;
  end

  always @(posedge clk) #1 out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic send_frame(bit gaps);
    img_t im, er;
    int side[];
    im = new[W * H];
    side = new[W * H];
    foreach (im[i]) begin
      im[i] = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 255);
      side[i] = $urandom_range(0, 255);
    end
    er = ref_erode(im, W, H);
    foreach (er[i]) begin
      exp_p.push_back(er[i]);
      exp_s.push_back(side[i]);
      if (er[i] != im[i]) changed++;
    end
    foreach (im[i]) begin
      pin = 8'(im[i]); sin = 8'(side[i]); in_valid = 1'b1;
      begin bit ok; do begin @(negedge clk); ok = in_ready; @(posedge clk); end while (!ok); end
      #1 in_valid = 1'b0;
      if (gaps && $urandom_range(0, 4) == 0) begin repeat ($urandom_range(1, 3)) @(posedge clk); #1; end
    end
  endtask

  initial begin
    int t0;
    in_valid = 0; out_ready = 1; pin = 0; sin = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int f = 0; f < FRAMES; f++) send_frame(1'b1);
    wait (exp_p.size() == 0); @(posedge clk); #1;
    // Full rate: W*H pixels plus a W-clock drain, one output per clock.
    bp = 1'b0;
    repeat (2) @(posedge clk); #1;
    t0 = int'($time);
    send_frame(1'b0);
    wait (exp_p.size() == 0); @(posedge clk); #1;
    checks++;
    if ((int'($time) - t0) / 10 > W * H + W + 3) begin
      failures++;
      $display("FAIL: full-rate frame took %0d clocks", (int'($time) - t0) / 10);
    end
    checks++;
    if (flushes != FRAMES + 1) begin failures++; $display("FAIL: %0d drains for %0d frames", flushes, FRAMES + 1); end
    checks++;
    if (changed == 0) begin failures++; $display("FAIL: erosion never changed a pixel"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
