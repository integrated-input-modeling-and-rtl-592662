// Image-processing front end on an FPGA board with four independent ZBT SRAM
// banks. Two pipelines stand side by side.
//
// Gesture recognition, memory side:
//   video decoder samples -> video_acquire -> (Region, outside) ->
//   frame_writer x2 -> bank_swap -> wb_zbt_ctrl x4 -> SRAM banks 0..3
//   SRAM banks -> wb_zbt_ctrl -> bank_swap -> frame_reader x2 -> (Contour, outside)
// Pixels leave video_acquire one at a time and go straight to the Region
// stage, which works pixel by pixel, so the input frame is never stored.
// Region's two output images are packed four pixels per word and written,
// one image per bank, into one bank pair while the Contour stage reads the
// previous frame's two images from the other pair; the pairs swap at frame
// boundaries. Region and Contour themselves are not part of this RTL: their
// connections are ports of this module.
//
// Motion detection: motion_detect compares each RGB frame with a background
// frame (grey level, thresholded difference, two erosions) and reports the
// moving pixels and a per-frame motion decision.
//
// Board bring-up: led_blinker lights two LEDs alternately from a clock
// divider, independent of both pipelines.
//
// All logic runs on one clock (clk), with the video samples qualified by
// vid_valid; reset is asynchronous and active high. The SRAM data buses are
// split into output, output-enable and input; each bank's pins are one row
// of the mem_* arrays.
module imgproc_top
  import imgproc_pkg::*;
#(
  parameter int unsigned FRAME_W_P   = FRAME_W,   // gesture frame width (even)
  parameter int unsigned FRAME_H_P   = FRAME_H,   // gesture frame height
  parameter int unsigned WR_FIFO     = 8,         // words queued per frame writer
  parameter int unsigned WR_BURST    = 4,         // words collected before a write burst
  parameter int unsigned RD_MAXLEN   = 256,       // longest Contour read burst
  parameter int unsigned MD_W        = 408,       // motion-detection frame width
  parameter int unsigned MD_H        = 306,       // motion-detection frame height
  parameter int unsigned MD_PASSES   = 2,         // erosion passes
  parameter int unsigned LED_DIV     = 22,        // LED clock-divider bits
  localparam int unsigned CW_P       = $clog2(FRAME_W_P),
  localparam int unsigned RW_P       = $clog2(FRAME_H_P),
  localparam int unsigned LW_P       = $clog2(RD_MAXLEN + 1),
  localparam int unsigned MDC_P      = $clog2(MD_W * MD_H + 1)
) (
  input  logic                        clk,
  input  logic                        rst,
  // video decoder
  input  logic                        vid_valid,
  input  logic                        vid_sof,
  input  logic [9:0]                  vid_data,
  output logic                        vid_resync,
  // to the Region stage
  output logic                        region_in_valid,
  output logic [7:0]                  region_in_y,
  output logic [7:0]                  region_in_cb,
  output logic [7:0]                  region_in_cr,
  output logic [CW_P-1:0]             region_in_col,
  output logic [RW_P-1:0]             region_in_row,
  output logic                        region_in_sof,
  output logic                        region_in_eof,
  // from the Region stage: one pixel of each output image
  input  logic                        region_out_valid,
  input  logic                        region_out_sof,
  input  logic [1:0][7:0]             region_out_pix,
  // Contour read ports, one per Region output image
  input  logic [1:0]                  contour_req_valid,
  output logic [1:0]                  contour_req_ready,
  input  logic [1:0][MEM_AW-1:0]      contour_req_addr,
  input  logic [1:0][LW_P-1:0]        contour_req_len,
  output logic [1:0]                  contour_rd_valid,
  output logic [1:0][31:0]            contour_rd_data,
  output logic [1:0]                  contour_rd_last,
  output logic                        contour_frame_ready,
  input  logic                        contour_frame_done,
  // memory-system status
  output logic                        wr_pair,
  output logic                        contour_busy,
  output logic [15:0]                 frames_dropped,
  output logic [1:0]                  wr_frame_done,
  output logic [1:0]                  wr_overflow,
  output logic [1:0]                  wr_burst_started,
  output logic [1:0]                  wr_single_started,
  // SRAM banks 0..3
  output logic [3:0][MEM_AW-1:0]      mem_addr,
  output logic [3:0]                  mem_ce_n,
  output logic [3:0]                  mem_we_n,
  output logic [3:0][MEM_SW-1:0]      mem_bw_n,
  output logic [3:0]                  mem_adv_ld_n,
  output logic [3:0]                  mem_oe_n,
  output logic [3:0][MEM_DW-1:0]      mem_dq_o,
  output logic [3:0]                  mem_dq_oe,
  input  logic [3:0][MEM_DW-1:0]      mem_dq_i,
  // motion detection
  input  logic [7:0]                  md_threshold,
  input  logic [MDC_P-1:0]            md_min_pixels,
  input  logic                        md_in_valid,
  output logic                        md_in_ready,
  input  logic [2:0][7:0]             md_cur_rgb,      // [2]=R [1]=G [0]=B
  input  logic [2:0][7:0]             md_bg_rgb,
  output logic                        md_out_valid,
  input  logic                        md_out_ready,
  output logic [7:0]                  md_out_diff,
  output logic [7:0]                  md_out_red,
  output logic                        md_frame_done,
  output logic [MDC_P-1:0]            md_moved_pixels,
  output logic                        md_motion,
  output logic [MD_PASSES-1:0]        md_erode_flush,
  // board LEDs
  output logic [1:0]                  led,
  output logic                        led_toggle
);

  // ---------------- gesture recognition: video acquisition ----------------
  video_acquire #(.W(FRAME_W_P), .H(FRAME_H_P)) u_video (
    .clk, .rst, .vid_valid, .vid_sof, .vid_data,
    .pix_valid(region_in_valid), .pix_y(region_in_y), .pix_cb(region_in_cb),
    .pix_cr(region_in_cr), .pix_col(region_in_col), .pix_row(region_in_row),
    .pix_sof(region_in_sof), .pix_eof(region_in_eof), .resync(vid_resync)
  );

  // ---------------- Region output -> banks ----------------
  wb_m2s_t wr_m [2];
  wb_s2m_t wr_s [2];
  wb_m2s_t rd_m [2];
  wb_s2m_t rd_s [2];
  wb_m2s_t bank_m [4];
  wb_s2m_t bank_s [4];
  logic    frame_go;

  for (genvar k = 0; k < 2; k++) begin : g_img
    frame_writer #(.W(FRAME_W_P), .H(FRAME_H_P), .BASE(0), .DEPTH(WR_FIFO), .BURST_MIN(WR_BURST)) u_writer (
      .clk, .rst, .in_valid(region_out_valid), .in_sof(region_out_sof),
      .in_pix(region_out_pix[k]), .wb_o(wr_m[k]), .wb_i(wr_s[k]),
      .frame_done(wr_frame_done[k]), .frame_go, .overflow(wr_overflow[k]),
      .burst_started(wr_burst_started[k]), .single_started(wr_single_started[k])
    );

    frame_reader #(.BASE(0), .MAXLEN(RD_MAXLEN)) u_reader (
      .clk, .rst, .req_valid(contour_req_valid[k]), .req_ready(contour_req_ready[k]),
      .req_addr(contour_req_addr[k]), .req_len(contour_req_len[k]),
      .rd_valid(contour_rd_valid[k]), .rd_data(contour_rd_data[k]),
      .rd_last(contour_rd_last[k]), .wb_o(rd_m[k]), .wb_i(rd_s[k])
    );
  end

  bank_swap u_swap (
    .clk, .rst, .wr_m, .wr_s, .wr_frame_done, .frame_go,
    .rd_m, .rd_s, .rd_frame_ready(contour_frame_ready), .rd_frame_done(contour_frame_done),
    .bank_m, .bank_s, .wr_pair, .rd_busy(contour_busy), .frames_dropped
  );

  for (genvar b = 0; b < 4; b++) begin : g_bank
    wb_zbt_ctrl u_ctrl (
      .clk_i(clk), .rst_i(rst),
      .cyc_i(bank_m[b].cyc), .stb_i(bank_m[b].stb), .we_i(bank_m[b].we),
      .adr_i(bank_m[b].adr), .sel_i(bank_m[b].sel), .dat_i(bank_m[b].dat),
      .cti_i(bank_m[b].cti), .bte_i(bank_m[b].bte),
      .dat_o(bank_s[b].dat), .ack_o(bank_s[b].ack),
      .mem_addr(mem_addr[b]), .mem_ce_n(mem_ce_n[b]), .mem_we_n(mem_we_n[b]),
      .mem_bw_n(mem_bw_n[b]), .mem_adv_ld_n(mem_adv_ld_n[b]), .mem_oe_n(mem_oe_n[b]),
      .mem_dq_o(mem_dq_o[b]), .mem_dq_oe(mem_dq_oe[b]), .mem_dq_i(mem_dq_i[b])
    );
  end

  // ---------------- motion detection ----------------
  motion_detect #(.W(MD_W), .H(MD_H), .PASSES(MD_PASSES)) u_motion (
    .clk, .rst, .threshold(md_threshold), .min_pixels(md_min_pixels),
    .in_valid(md_in_valid), .in_ready(md_in_ready),
    .cur_r(md_cur_rgb[2]), .cur_g(md_cur_rgb[1]), .cur_b(md_cur_rgb[0]),
    .bg_r(md_bg_rgb[2]), .bg_g(md_bg_rgb[1]), .bg_b(md_bg_rgb[0]),
    .out_valid(md_out_valid), .out_ready(md_out_ready), .out_diff(md_out_diff),
    .out_red(md_out_red), .frame_done(md_frame_done), .moved_pixels(md_moved_pixels),
    .motion(md_motion), .erode_flush(md_erode_flush)
  );

  // ---------------- board LEDs ----------------
  led_blinker #(.DIV_BITS(LED_DIV)) u_leds (.clk, .rst, .led, .led_toggle);

endmodule
