// Motion detection on a stream of RGB frames against a stored background.
//
// For every pixel the pipeline computes the grey level of the current frame
// and of the background frame, takes their absolute difference, zeroes it
// when it is below a threshold, and erodes the resulting difference image
// PASSES times (twice by default) to remove isolated noise. Two results
// leave the pipeline:
//   * a motion image: per pixel, the eroded difference (out_diff), and the
//     background's red channel with that difference added and saturated at
//     255 (out_red), which marks the moving object in red over the background;
//   * a detection result once per frame: the number of pixels whose eroded
//     difference is non-zero (moved_pixels), and motion = moved_pixels is at
//     least min_pixels.
// The pixel stages work one pixel per clock (the schedule fires Video,
// Greylevel and Difference once per pixel); the erosion stages hold only two
// rows each, never a whole frame. The background frame itself is stored
// outside this block: the caller streams each background pixel alongside the
// matching current pixel, in raster order.
//
// Interface: valid/ready input and output, W x H pixels per frame, no frame
// marker (frames are counted). frame_done pulses for one clock with the
// detection result of the frame whose last pixel just left. Latency is about
// PASSES rows plus a few clocks; each erosion stage stalls its input for W
// clocks at the end of each frame while it drains (see erosion_filter).
// The 8-bit fixed-point grey level, the saturating overlay and the detection
// rule with a pixel-count threshold are this design's choices where the
// algorithm works on real numbers or leaves the detection step open.
module motion_detect #(
  parameter int unsigned W      = 408,
  parameter int unsigned H      = 306,
  parameter int unsigned PASSES = 2,
  localparam int unsigned CW    = $clog2(W * H + 1)
) (
  input  logic          clk,
  input  logic          rst,          // asynchronous, active high
  input  logic [7:0]    threshold,
  input  logic [CW-1:0] min_pixels,
  // current and background pixel, same position
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [7:0]    cur_r, cur_g, cur_b,
  input  logic [7:0]    bg_r,  bg_g,  bg_b,
  // motion image
  output logic          out_valid,
  input  logic          out_ready,
  output logic [7:0]    out_diff,
  output logic [7:0]    out_red,
  // per-frame detection
  output logic          frame_done,
  output logic [CW-1:0] moved_pixels,
  output logic          motion,
  // observation of the erosion stages' end-of-frame drain (one bit per stage)
  output logic [PASSES-1:0] erode_flush
);
  // Stage 1: grey level of the current pixel; the background RGB rides along.
  logic       g1_valid, g1_ready;
  logic [7:0] g1_y;
  logic [23:0] g1_side;
  grey_level #(.SIDE_W(24)) u_grey_cur (
    .clk, .rst, .in_valid, .in_ready,
    .in_r(cur_r), .in_g(cur_g), .in_b(cur_b), .in_side({bg_r, bg_g, bg_b}),
    .out_valid(g1_valid), .out_ready(g1_ready), .out_y(g1_y), .out_side(g1_side)
  );

  // Stage 2: grey level of the background pixel; current grey and background red ride along.
  logic       g2_valid, g2_ready;
  logic [7:0] g2_y;
  logic [15:0] g2_side;
  grey_level #(.SIDE_W(16)) u_grey_bg (
    .clk, .rst, .in_valid(g1_valid), .in_ready(g1_ready),
    .in_r(g1_side[23:16]), .in_g(g1_side[15:8]), .in_b(g1_side[7:0]),
    .in_side({g1_y, g1_side[23:16]}),
    .out_valid(g2_valid), .out_ready(g2_ready), .out_y(g2_y), .out_side(g2_side)
  );

  // Stage 3: thresholded difference; background red rides along.
  logic [PASSES:0]  e_valid, e_ready;
  logic [7:0]       e_pix  [PASSES+1];
  logic [7:0]       e_side [PASSES+1];
  diff_threshold #(.SIDE_W(8)) u_diff (
    .clk, .rst, .threshold, .in_valid(g2_valid), .in_ready(g2_ready),
    .in_a(g2_side[15:8]), .in_b(g2_y), .in_side(g2_side[7:0]),
    .out_valid(e_valid[0]), .out_ready(e_ready[0]), .out_d(e_pix[0]), .out_side(e_side[0])
  );

  // Stage 4: erosion, PASSES times.
  for (genvar p = 0; p < PASSES; p++) begin : g_erode
    erosion_filter #(.W(W), .H(H), .SIDE_W(8)) u_erode (
      .clk, .rst,
      .in_valid(e_valid[p]), .in_ready(e_ready[p]), .in_pix(e_pix[p]), .in_side(e_side[p]),
      .out_valid(e_valid[p+1]), .out_ready(e_ready[p+1]), .out_pix(e_pix[p+1]),
      .out_side(e_side[p+1]), .out_flush(erode_flush[p])
    );
  end

  // Stage 5: overlay on the background red channel and per-frame detection.
  logic [8:0]    red_sum;
  logic [CW-1:0] pix_cnt, moved_cnt;
  logic          last_pix, fire;

  assign red_sum         = {1'b0, e_side[PASSES]} + {1'b0, e_pix[PASSES]};
  assign e_ready[PASSES] = !out_valid || out_ready;
  assign fire            = e_valid[PASSES] && e_ready[PASSES];
  assign last_pix        = (pix_cnt == CW'(W * H - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      out_valid    <= 1'b0;
      out_diff     <= '0;
      out_red      <= '0;
      pix_cnt      <= '0;
      moved_cnt    <= '0;
      frame_done   <= 1'b0;
      moved_pixels <= '0;
      motion       <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out_diff  <= e_pix[PASSES];
        out_red   <= red_sum[8] ? 8'hFF : red_sum[7:0];
        if (last_pix) begin
          pix_cnt      <= '0;
          moved_cnt    <= '0;
          frame_done   <= 1'b1;
          moved_pixels <= moved_cnt + CW'(e_pix[PASSES] != 8'd0);
          motion       <= (moved_cnt + CW'(e_pix[PASSES] != 8'd0)) >= min_pixels;
        end else begin
          pix_cnt   <= pix_cnt + 1'b1;
          moved_cnt <= moved_cnt + CW'(e_pix[PASSES] != 8'd0);
        end
      end
    end
  end
endmodule
