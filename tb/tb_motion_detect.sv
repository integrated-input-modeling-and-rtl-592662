// Testbench for motion_detect on small frames: each frame pairs a random
// background with a current frame that equals it except for a moving
// rectangle and some isolated noise pixels. The reference (grey level,
// thresholded difference, erosion twice, red overlay, moved-pixel count) is
// computed in the testbench with real-valued grey levels; because the RTL's
// fixed-point grey level may differ by one, the reference is recomputed from
// the grey values the testbench derives with the RTL's published formula
// (77 R + 150 G + 29 B + 128) >> 8, and the real-valued grey is used only to
// check that formula stays within one level. Checks every output pixel, the
// per-frame count and motion flag (with min_pixels set both below and above
// the count), and that both erosion drains happened.
module tb_motion_detect;
  import tb_imgref_pkg::*;

  localparam int W = 12, H = 10, FRAMES = 8;

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  logic in_valid, in_ready, out_valid, out_ready, frame_done, motion;
  logic [7:0] thr, cr, cg, cb, br, bgg, bb, od, ored;
  logic [$clog2(W*H+1)-1:0] min_pix, moved;
  logic [1:0] eflush;

  motion_detect #(.W(W), .H(H), .PASSES(2)) dut (
    .clk, .rst, .threshold(thr), .min_pixels(min_pix),
    .in_valid, .in_ready, .cur_r(cr), .cur_g(cg), .cur_b(cb), .bg_r(br), .bg_g(bgg), .bg_b(bb),
    .out_valid, .out_ready, .out_diff(od), .out_red(ored),
    .frame_done, .moved_pixels(moved), .motion, .erode_flush(eflush)
  );

  int checks = 0, failures = 0;
  int exp_d[$], exp_r[$], exp_cnt[$], exp_mot[$];
  int drains0 = 0, drains1 = 0, motions = 0, stills = 0;
  logic [1:0] ef_q = '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int hw_grey(int r, int g, int b);
    return (77 * r + 150 * g + 29 * b + 128) >> 8;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && out_valid && out_ready) begin
      int e, r;
      e = exp_d.pop_front();
      r = exp_r.pop_front();
      check(int'(od) == e && int'(ored) == r, $sformatf("pixel diff=%0d exp %0d red=%0d exp %0d", od, e, ored, r));
    end
    if (!rst && frame_done) begin
      int c, m;
      c = exp_cnt.pop_front();
      m = exp_mot.pop_front();
      check(int'(moved) == c, $sformatf("moved pixels %0d exp %0d", moved, c));
      check(int'(motion) == m, $sformatf("motion %0d exp %0d", motion, m));
      if (motion) motions++; else stills++;
    end
    if (eflush[0] && !ef_q[0]) drains0++;
    if (eflush[1] && !ef_q[1]) drains1++;
    ef_q = eflush;
  end

  always @(posedge clk) #1 out_ready = ($urandom_range(0, 4) != 0);

  task automatic run_frame(int f);
    int bgc[][3], cur[][3];
    img_t d;
    int cnt, x0, y0;
    bgc = new[W * H];
    cur = new[W * H];
    d = new[W * H];
    x0 = $urandom_range(1, W - 8);
    y0 = $urandom_range(1, H - 7);
    foreach (bgc[i]) begin
      for (int k = 0; k < 3; k++) begin bgc[i][k] = $urandom_range(0, 255); cur[i][k] = bgc[i][k]; end
    end
    // moving object: a dark 7x6 block over a bright background patch (none in some frames)
    if (f % 4 != 3)
      for (int yy = y0; yy < y0 + 6; yy++)
        for (int xx = x0; xx < x0 + 7; xx++)
          for (int k = 0; k < 3; k++) begin
            bgc[yy * W + xx][k] = $urandom_range(200, 255);
            cur[yy * W + xx][k] = $urandom_range(0, 40);
          end
    // isolated noise
    for (int n = 0; n < 3; n++) begin
      int p;
      p = $urandom_range(0, W * H - 1);
      cur[p][0] = (bgc[p][0] + 90) % 256;
    end
    foreach (d[i]) begin
      int gc, gb;
      gc = hw_grey(cur[i][0], cur[i][1], cur[i][2]);
      gb = hw_grey(bgc[i][0], bgc[i][1], bgc[i][2]);
      check((gc - ref_grey(cur[i][0], cur[i][1], cur[i][2])) inside {-1, 0, 1}, "grey formula");
      d[i] = ref_diff(gc, gb, int'(thr));
    end
    d = ref_erode(ref_erode(d, W, H), W, H);
    cnt = 0;
    foreach (d[i]) begin
      exp_d.push_back(d[i]);
      exp_r.push_back((bgc[i][0] + d[i] > 255) ? 255 : bgc[i][0] + d[i]);
      if (d[i] != 0) cnt++;
    end
    exp_cnt.push_back(cnt);
    exp_mot.push_back(cnt >= int'(min_pix));
    foreach (cur[i]) begin
      bit ok;
      cr = 8'(cur[i][0]); cg = 8'(cur[i][1]); cb = 8'(cur[i][2]);
      br = 8'(bgc[i][0]); bgg = 8'(bgc[i][1]); bb = 8'(bgc[i][2]);
      in_valid = 1'b1;
      do begin @(negedge clk); ok = in_ready; @(posedge clk); end while (!ok);
      #1 in_valid = 1'b0;
      if ($urandom_range(0, 5) == 0) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    in_valid = 0; out_ready = 1; thr = 8'd15; min_pix = 4;
    {cr, cg, cb, br, bgg, bb} = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int f = 0; f < FRAMES; f++) begin
      thr = (f % 2) ? 8'd60 : 8'd15;
      run_frame(f);
      wait (exp_d.size() == 0 && exp_cnt.size() == 0); @(posedge clk); #1;
    end
    check(drains0 == FRAMES && drains1 == FRAMES, $sformatf("erosion drains %0d/%0d", drains0, drains1));
    check(motions > 0 && stills > 0, $sformatf("motion flag both ways (%0d/%0d)", motions, stills));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
