// Swapping-banks controller and Wishbone router for the Region -> Contour
// edge of the gesture-recognition pipeline.
//
// Four SRAM banks form two pairs, {0,1} and {2,3}. Region's two output images
// of a frame are written into one pair (image k into the pair's bank k, four
// pixels per word), while Contour reads the two images of the previous frame
// from the other pair. Because each side owns whole banks, neither ever waits
// for the other's accesses, and each image needs only W*H/4 words of its bank.
// When both frame writers have finished a frame the pairs change roles: the
// pair just written is handed to the reader side (rd_frame_ready pulses) and
// the writers continue into the other pair (frame_go pulses). If the reader
// side has not yet reported that it is done with its frame (rd_frame_done),
// the pairs are not swapped: the finished frame is dropped (frames_dropped
// counts up), the writers overwrite the same pair with the next frame, and
// the reader keeps its frame undisturbed. Dropping a frame rather than
// stalling the video is this design's choice.
//
// Routing is combinational: bank b is connected to writer (b mod 2) when its
// pair is the write pair and to reader (b mod 2) otherwise. Roles change only
// when no master has a bus cycle open (asserted).
//
// Timing: the swap decision is registered one clock after the second
// writer's frame_done; frame_go and rd_frame_ready pulse in that clock.
module bank_swap
  import imgproc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,             // asynchronous, active high
  // frame writers (image 0 and 1)
  input  wb_m2s_t     wr_m   [2],
  output wb_s2m_t     wr_s   [2],
  input  logic [1:0]  wr_frame_done,
  output logic        frame_go,
  // frame readers (image 0 and 1)
  input  wb_m2s_t     rd_m   [2],
  output wb_s2m_t     rd_s   [2],
  output logic        rd_frame_ready,
  input  logic        rd_frame_done,
  // memory controllers of banks 0..3
  output wb_m2s_t     bank_m [4],
  input  wb_s2m_t     bank_s [4],
  // status
  output logic        wr_pair,         // pair written now: 0 = banks 0,1; 1 = banks 2,3
  output logic        rd_busy,         // reader side holds a frame
  output logic [15:0] frames_dropped
);
  logic [1:0] done_seen;
  logic [1:0] done_all;

  assign done_all = done_seen | wr_frame_done;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_pair        <= 1'b0;
      rd_busy        <= 1'b0;
      done_seen      <= '0;
      frame_go       <= 1'b0;
      rd_frame_ready <= 1'b0;
      frames_dropped <= '0;
    end else begin
      frame_go       <= 1'b0;
      rd_frame_ready <= 1'b0;
      if (rd_frame_done) rd_busy <= 1'b0;
      if (done_all == 2'b11) begin
        done_seen <= '0;
        frame_go  <= 1'b1;
        if (!rd_busy || rd_frame_done) begin
          wr_pair        <= ~wr_pair;
          rd_busy        <= 1'b1;
          rd_frame_ready <= 1'b1;
        end else begin
          frames_dropped <= frames_dropped + 1'b1;
        end
      end else begin
        done_seen <= done_all;
      end
    end
  end

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      if ((b / 2) == int'(wr_pair)) bank_m[b] = wr_m[b % 2];
      else                          bank_m[b] = rd_m[b % 2];
    end
    for (int k = 0; k < 2; k++) begin
      wr_s[k] = bank_s[2 * int'(wr_pair) + k];
      rd_s[k] = bank_s[2 * int'(!wr_pair) + k];
    end
  end

  a_swap_when_idle: assert property (@(posedge clk) disable iff (rst)
    (done_all == 2'b11) && (!rd_busy || rd_frame_done) |->
      !(wr_m[0].cyc || wr_m[1].cyc || rd_m[0].cyc || rd_m[1].cyc))
    else $error("bank_swap: banks swapped during an open bus cycle");
endmodule
