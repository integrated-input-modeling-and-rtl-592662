// End-to-end test environment for imgproc_top, shared by the reduced-size and
// the full-size testbenches (FULL = 1 instantiates the top with its own
// default parameters; the other parameters must then match those defaults).
//
// Around the top it places four ZBT SRAM models, a stand-in for the Region
// stage (the top's Region ports are connected to a simple per-pixel function:
// image 0 = luma, image 1 = Cb xor Cr, one clock later), and a stand-in for
// the Contour stage that, each time a frame is handed over, reads both images
// back through the read ports (long bursts for a full scan, then single
// reads at random places) and compares every word with the frame the video
// source sent. The Contour stand-in deliberately keeps frame 1 until frame 2
// has been written, so frame 2 must be dropped and frame 3 delivered. At the
// same time the motion-detection pipeline receives frames with and without a
// moving block and is checked against a reference model. Every mechanism the
// design has is counted and must have occurred: single and burst writes,
// bank swaps, a dropped frame, burst and single reads, the erosion drains that
// stall the motion input, output back-pressure, both motion decisions, and
// the LED blinker changing over (at least twice, with one LED lit at a time).
// Single writes are expected only when an image's word count leaves a
// remainder of one after the 4-word bursts; otherwise none may occur.
//
// Timing: one video sample every VGAP clocks, 200 clocks of blanking between
// frames; no frame-writer overflow and no video resync are allowed. Inputs
// are driven just after a rising edge and outputs sampled at falling edges.
module imgproc_env #(
  parameter bit FULL       = 1'b0,
  parameter int FW         = 32,
  parameter int FH         = 8,
  parameter int MDW        = 16,
  parameter int MDH        = 10,
  parameter int RD_MAXLEN  = 256,
  parameter int VFRAMES    = 4,
  parameter int MDFRAMES   = 3,
  parameter int LED_DIV    = 22,
  parameter int VGAP       = 2      // clocks per video sample (1 = a sample every clock)
);
  import imgproc_pkg::*;
  import tb_imgref_pkg::*;

  localparam int CW_P  = $clog2(FW);
  localparam int RW_P  = $clog2(FH);
  localparam int LW_P  = $clog2(RD_MAXLEN + 1);
  localparam int MDC_P = $clog2(MDW * MDH + 1);
  localparam int WORDS = FW * FH / 4;
  localparam int MD_PASSES = 2;

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  // ---------------- top-level signals (names match the top's ports) ----------------
  logic                   vid_valid, vid_sof, vid_resync;
  logic [9:0]             vid_data;
  logic                   region_in_valid, region_in_sof, region_in_eof;
  logic [7:0]             region_in_y, region_in_cb, region_in_cr;
  logic [CW_P-1:0]        region_in_col;
  logic [RW_P-1:0]        region_in_row;
  logic                   region_out_valid, region_out_sof;
  logic [1:0][7:0]        region_out_pix;
  logic [1:0]             contour_req_valid, contour_req_ready, contour_rd_valid, contour_rd_last;
  logic [1:0][MEM_AW-1:0] contour_req_addr;
  logic [1:0][LW_P-1:0]   contour_req_len;
  logic [1:0][31:0]       contour_rd_data;
  logic                   contour_frame_ready, contour_frame_done, contour_busy, wr_pair;
  logic [15:0]            frames_dropped;
  logic [1:0]             wr_frame_done, wr_overflow, wr_burst_started, wr_single_started;
  logic [3:0][MEM_AW-1:0] mem_addr;
  logic [3:0]             mem_ce_n, mem_we_n, mem_adv_ld_n, mem_oe_n, mem_dq_oe;
  logic [3:0][MEM_SW-1:0] mem_bw_n;
  logic [3:0][MEM_DW-1:0] mem_dq_o, mem_dq_i;
  logic [7:0]             md_threshold, md_out_diff, md_out_red;
  logic [MDC_P-1:0]       md_min_pixels, md_moved_pixels;
  logic                   md_in_valid, md_in_ready, md_out_valid, md_out_ready;
  logic                   md_frame_done, md_motion;
  logic [2:0][7:0]        md_cur_rgb, md_bg_rgb;
  logic [MD_PASSES-1:0]   md_erode_flush;
  logic [1:0]             led;
  logic                   led_toggle;

  if (FULL) begin : g_full
    imgproc_top u_top (.*);
  end else begin : g_small
    imgproc_top #(.FRAME_W_P(FW), .FRAME_H_P(FH), .RD_MAXLEN(RD_MAXLEN),
                  .MD_W(MDW), .MD_H(MDH), .MD_PASSES(MD_PASSES), .LED_DIV(LED_DIV)) u_top (.*);
  end

  logic [3:0] sram_drive;
  for (genvar b = 0; b < 4; b++) begin : g_sram
    zbt_sram_model #(.AW(MEM_AW), .DW(MEM_DW), .INIT_SEED(32'(b) * 32'h1111_1111)) u_sram (
      .clk, .addr(mem_addr[b]), .ce_n(mem_ce_n[b]), .we_n(mem_we_n[b]), .bw_n(mem_bw_n[b]),
      .adv_ld_n(mem_adv_ld_n[b]), .oe_n(mem_oe_n[b]), .dq_i(mem_dq_o[b]), .dq_i_en(mem_dq_oe[b]),
      .dq_o(mem_dq_i[b]), .dq_o_en(sram_drive[b])
    );
  end

  // ---------------- Region stand-in ----------------
  always_ff @(posedge clk) begin
    region_out_valid  <= region_in_valid;
    region_out_sof    <= region_in_sof;
    region_out_pix[0] <= region_in_y;
    region_out_pix[1] <= region_in_cb ^ region_in_cr;
  end

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  typedef logic [7:0] img_b_t[];
  img_b_t exp_img [VFRAMES][2];

  int n_single_wr = 0, n_burst_wr = 0, n_swaps = 0, n_frames_written = 0;
  int n_burst_rd = 0, n_single_rd = 0, n_md_drain = 0, n_md_stall = 0, n_md_bp = 0;
  int n_led = 0, n_motion = 0, n_still = 0, n_overflow = 0, n_resync = 0;
  int delivered[$];
  logic [MD_PASSES-1:0] flush_q = '0;

  always @(negedge clk) if (!rst) begin
    n_single_wr += int'(wr_single_started[0]) + int'(wr_single_started[1]);
    n_burst_wr  += int'(wr_burst_started[0]) + int'(wr_burst_started[1]);
    if (wr_frame_done[0]) n_frames_written++;
    if (contour_frame_ready) n_swaps++;
    n_overflow += int'(wr_overflow[0]) + int'(wr_overflow[1]);
    if (vid_resync) n_resync++;
    if (md_in_valid && !md_in_ready) n_md_stall++;
    if (led_toggle) n_led++;
    if (led != 2'b01 && led != 2'b10) begin failures++; $display("FAIL: LEDs led=%b", led); end
    if (md_out_valid && !md_out_ready) n_md_bp++;
    for (int p = 0; p < MD_PASSES; p++) if (md_erode_flush[p] && !flush_q[p]) n_md_drain++;
    flush_q = md_erode_flush;
  end

  // ---------------- video source ----------------
  task automatic vsample(int v, bit sof);
    vid_data = 10'(v); vid_sof = sof; vid_valid = 1'b1;
    @(posedge clk); #1;
    vid_valid = 1'b0; vid_sof = 1'b0;
    repeat (VGAP - 1) begin @(posedge clk); #1; end
  endtask

  task automatic send_video_frame(int f);
    exp_img[f][0] = new[FW * FH];
    exp_img[f][1] = new[FW * FH];
    for (int p = 0; p < FW * FH / 2; p++) begin
      int cb, y0, cr, y1;
      cb = $urandom_range(0, 1023); y0 = $urandom_range(0, 1023);
      cr = $urandom_range(0, 1023); y1 = $urandom_range(0, 1023);
      exp_img[f][0][2 * p]     = 8'(y0 >> 2);
      exp_img[f][0][2 * p + 1] = 8'(y1 >> 2);
      exp_img[f][1][2 * p]     = 8'((cb >> 2) ^ (cr >> 2));
      exp_img[f][1][2 * p + 1] = 8'((cb >> 2) ^ (cr >> 2));
      vsample(cb, p == 0); vsample(y0, 0); vsample(cr, 0); vsample(y1, 0);
    end
  endtask

  // ---------------- Contour stand-in ----------------
  task automatic read_words(int k, int addr, int len, int f);
    bit ok;
    int got;
    contour_req_addr[k] = MEM_AW'(addr);
    contour_req_len[k]  = LW_P'(len);
    contour_req_valid[k] = 1'b1;
    do begin @(negedge clk); ok = contour_req_ready[k]; @(posedge clk); end while (!ok);
    #1 contour_req_valid[k] = 1'b0;
    if (len > 1) n_burst_rd++; else n_single_rd++;
    got = 0;
    while (got < len) begin
      @(negedge clk);
      if (contour_rd_valid[k]) begin
        int w;
        w = addr + got;
        check(contour_rd_data[k] == {exp_img[f][k][4*w+3], exp_img[f][k][4*w+2],
                                     exp_img[f][k][4*w+1], exp_img[f][k][4*w]},
              $sformatf("frame %0d image %0d word %0d = %08h", f, k, w, contour_rd_data[k]));
        check(contour_rd_last[k] == (got == len - 1), "rd_last");
        got++;
      end
    end
    @(posedge clk); #1;
  endtask

  task automatic read_image(int k, int f);
    for (int a = 0; a < WORDS; a += RD_MAXLEN)
      read_words(k, a, (WORDS - a < RD_MAXLEN) ? WORDS - a : RD_MAXLEN, f);
    for (int i = 0; i < 8; i++) read_words(k, $urandom_range(0, WORDS - 1), 1, f);
  endtask

  bit video_done = 1'b0, contour_done_all = 1'b0, md_done = 1'b0;

  initial begin : contour
    contour_req_valid = '0; contour_req_addr = '0; contour_req_len = '0;
    contour_frame_done = 1'b0;
    forever begin
      int f;
      do @(negedge clk); while (!contour_frame_ready);
      f = n_frames_written - 1;
      delivered.push_back(f);
      @(posedge clk); #1;
      fork
        read_image(0, f);
        read_image(1, f);
      join
      // Hold frame 1 until frame 2 has been written, so that frame 2 is dropped.
      if (f == 1) begin
        while (n_frames_written < 3) @(posedge clk);
        repeat (20) @(posedge clk);
        #1;
      end
      contour_frame_done = 1'b1; @(posedge clk); #1 contour_frame_done = 1'b0;
      if (f == VFRAMES - 1) contour_done_all = 1'b1;
    end
  end

  initial begin : video
    vid_valid = 0; vid_sof = 0; vid_data = 0;
    @(negedge rst);
    repeat (10) @(posedge clk); #1;
    for (int f = 0; f < VFRAMES; f++) begin
      send_video_frame(f);
      repeat (200) @(posedge clk);   // vertical blanking
      #1;
    end
    video_done = 1'b1;
  end

  // ---------------- motion detection traffic ----------------
  int md_exp_d[$], md_exp_r[$], md_exp_cnt[$], md_exp_mot[$];

  always @(posedge clk) #1 md_out_ready = ($urandom_range(0, 7) != 0);

  always @(negedge clk) if (!rst) begin
    if (md_out_valid && md_out_ready) begin
      int e, r;
      e = md_exp_d.pop_front();
      r = md_exp_r.pop_front();
      check(int'(md_out_diff) == e && int'(md_out_red) == r,
            $sformatf("motion pixel diff=%0d exp %0d red=%0d exp %0d", md_out_diff, e, md_out_red, r));
    end
    if (md_frame_done) begin
      int c, m;
      c = md_exp_cnt.pop_front();
      m = md_exp_mot.pop_front();
      check(int'(md_moved_pixels) == c, $sformatf("moved %0d exp %0d", md_moved_pixels, c));
      check(int'(md_motion) == m, "motion decision");
      if (md_motion) n_motion++; else n_still++;
    end
  end

  function automatic int hw_grey(int r, int g, int b);
    return (77 * r + 150 * g + 29 * b + 128) >> 8;
  endfunction

  task automatic md_frame(int f);
    int bgc[][3], cur[][3];
    img_t d;
    int cnt, x0, y0;
    bgc = new[MDW * MDH]; cur = new[MDW * MDH]; d = new[MDW * MDH];
    foreach (bgc[i]) for (int k = 0; k < 3; k++) begin
      bgc[i][k] = $urandom_range(0, 255); cur[i][k] = bgc[i][k];
    end
    x0 = $urandom_range(1, MDW - 9); y0 = $urandom_range(1, MDH - 8);
    if (f % 3 != 2)
      for (int yy = y0; yy < y0 + 6; yy++)
        for (int xx = x0; xx < x0 + 7; xx++)
          for (int k = 0; k < 3; k++) begin
            bgc[yy * MDW + xx][k] = $urandom_range(200, 255);
            cur[yy * MDW + xx][k] = $urandom_range(0, 40);
          end
    for (int n = 0; n < 5; n++) begin
      int p;
      p = $urandom_range(0, MDW * MDH - 1);
      cur[p][1] = (bgc[p][1] + 120) % 256;
    end
    foreach (d[i])
      d[i] = ref_diff(hw_grey(cur[i][0], cur[i][1], cur[i][2]),
                      hw_grey(bgc[i][0], bgc[i][1], bgc[i][2]), int'(md_threshold));
    d = ref_erode(ref_erode(d, MDW, MDH), MDW, MDH);
    cnt = 0;
    foreach (d[i]) begin
      md_exp_d.push_back(d[i]);
      md_exp_r.push_back((bgc[i][0] + d[i] > 255) ? 255 : bgc[i][0] + d[i]);
      if (d[i] != 0) cnt++;
    end
    md_exp_cnt.push_back(cnt);
    md_exp_mot.push_back(cnt >= int'(md_min_pixels));
    foreach (cur[i]) begin
      bit ok;
      md_cur_rgb = {8'(cur[i][0]), 8'(cur[i][1]), 8'(cur[i][2])};
      md_bg_rgb  = {8'(bgc[i][0]), 8'(bgc[i][1]), 8'(bgc[i][2])};
      md_in_valid = 1'b1;
      do begin @(negedge clk); ok = md_in_ready; @(posedge clk); end while (!ok);
      #1 md_in_valid = 1'b0;
      if ($urandom_range(0, 7) == 0) begin @(posedge clk); #1; end
    end
  endtask

  initial begin : motion
    md_in_valid = 0; md_cur_rgb = '0; md_bg_rgb = '0; md_threshold = 8'd15; md_min_pixels = 4;
    @(negedge rst);
    repeat (10) @(posedge clk); #1;
    for (int f = 0; f < MDFRAMES; f++) begin
      md_threshold = (f % 2) ? 8'd60 : 8'd15;
      md_frame(f);
      wait (md_exp_d.size() == 0 && md_exp_cnt.size() == 0);
      @(posedge clk); #1;
    end
    md_done = 1'b1;
  end

  // ---------------- end of test ----------------
  localparam longint LIMIT = 64'(VFRAMES) * (64'(FW) * FH * 2 * VGAP + 4000) + 64'(MDFRAMES) * MDW * MDH * 4
                          + (64'(1) << LED_DIV) + 20000;
  initial begin
    for (longint i = 0; i < LIMIT; i++) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (video_done && contour_done_all && md_done && n_led >= 2);
    repeat (10) @(posedge clk);
    check(delivered.size() == 3 && delivered[0] == 0 && delivered[1] == 1 && delivered[2] == 3,
          $sformatf("frames handed to Contour: %p", delivered));
    check(frames_dropped == 16'd1, $sformatf("frames dropped %0d, expected 1", frames_dropped));
    check(n_overflow == 0, "no frame-writer overflow");
    check(n_resync == 0, "no video resync");
    $display("mechanisms: single writes %0d, burst writes %0d, swaps %0d, dropped %0d, burst reads %0d, single reads %0d",
             n_single_wr, n_burst_wr, n_swaps, frames_dropped, n_burst_rd, n_single_rd);
    $display("mechanisms: erosion drains %0d, motion input stalls %0d, output back-pressure %0d, motion %0d, still %0d, LED changes %0d",
             n_md_drain, n_md_stall, n_md_bp, n_motion, n_still, n_led);
    // Words are written in bursts of 4; only a frame whose word count leaves
    // a remainder of one ends with a single write.
    if (WORDS % 4 == 1) check(n_single_wr > 0, "single writes happened");
    else                check(n_single_wr == 0, "no single writes expected");
    check(n_burst_wr > 0, "burst writes happened");
    check(n_swaps == 3, "bank swaps happened");
    check(n_burst_rd > 0 && n_single_rd > 0, "burst and single reads happened");
    check(n_md_drain == MD_PASSES * MDFRAMES, "erosion drains happened");
    check(n_md_stall > 0, "motion input stalled");
    check(n_md_bp > 0, "motion output back-pressure happened");
    check(n_motion > 0 && n_still > 0, "both motion decisions happened");
    check(n_led >= 2, "LEDs changed over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
