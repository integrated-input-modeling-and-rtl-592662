// Frame writer: stores one Region output image in an external SRAM bank,
// four 8-bit pixels per 32-bit word.
//
// Pixels arrive in raster order at the pixel rate and cannot be held back
// (they come from the video path). Four consecutive pixels are packed little
// endian (the first pixel in bits 7:0) and the word is queued in a small
// FIFO. A Wishbone master empties the FIFO. It waits until BURST_MIN words
// are queued (or, at the end of a frame, until every remaining word of the
// frame is queued) and then issues a linear incrementing burst of all the
// words present (end-of-burst on the last beat), so that several words cost
// about one clock each instead of a full access each; a lone word (the last
// word of a frame, or any word when BURST_MIN is 1) is written with a single
// classic cycle. Waiting for BURST_MIN words is this design's choice: pixels
// arrive at most every second clock, so without it every word would be
// written alone.
// Word k of a frame goes to address BASE + k; a frame of W x H pixels fills
// W*H/4 words (23040 for 384 x 240).
//
// When the last word of a frame has been acknowledged, frame_done pulses and
// the writer waits for frame_go before it writes any word of the next frame
// (pixels keep arriving and are queued meanwhile); this lets the bank-swapping
// controller change the bank behind the writer between frames. A pixel that
// finds the FIFO full is lost and overflow pulses. The first pixel of a frame
// is marked by in_sof, which restarts the packing at byte 0.
//
// Interface: pixel input (in_valid/in_pix/in_sof), Wishbone master (wb_o,
// wb_i) in the registered-feedback form served by wb_zbt_ctrl, and status
// pulses. burst_started/single_started pulse when a write cycle starts.
module frame_writer
  import imgproc_pkg::*;
#(
  parameter int unsigned W     = FRAME_W,
  parameter int unsigned H     = FRAME_H,
  parameter int unsigned BASE  = 0,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned BURST_MIN = 4    // words queued before a write starts (<= DEPTH)
) (
  input  logic    clk,
  input  logic    rst,            // asynchronous, active high
  input  logic    in_valid,
  input  logic    in_sof,
  input  logic [7:0] in_pix,
  output wb_m2s_t wb_o,
  input  wb_s2m_t wb_i,
  output logic    frame_done,
  input  logic    frame_go,
  output logic    overflow,
  output logic    burst_started,
  output logic    single_started
);
  localparam int unsigned WORDS = W * H / 4;
  localparam int unsigned KW    = $clog2(WORDS + 1);
  localparam int unsigned PW    = $clog2(DEPTH);

  if (BURST_MIN < 1 || BURST_MIN > DEPTH || (W * H) % 4 != 0) begin : g_bad_params
    $error("frame_writer: need 1 <= BURST_MIN <= DEPTH and W*H divisible by 4");
  end

  // Packing.
  logic [23:0] pack;
  logic [1:0]  lane;
  logic        push;
  logic [31:0] push_word;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pack <= '0;
      lane <= '0;
    end else if (in_valid) begin
      if (in_sof) begin
        pack[7:0] <= in_pix;
        lane      <= 2'd1;
      end else begin
        unique case (lane)
          2'd0: pack[7:0]   <= in_pix;
          2'd1: pack[15:8]  <= in_pix;
          2'd2: pack[23:16] <= in_pix;
          2'd3: ;
        endcase
        lane <= lane + 1'b1;
      end
    end
  end

  assign push      = in_valid && !in_sof && (lane == 2'd3);
  assign push_word = {in_pix, pack};

  // Word FIFO.
  logic [31:0]   fifo [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [PW:0]   count;
  logic          pop, full;

  assign full = (count == (PW+1)'(DEPTH));

  always_ff @(posedge clk) if (push && !full) fifo[wr_ptr] <= push_word;

  // Wishbone master.
  typedef enum logic [1:0] {M_IDLE, M_SINGLE, M_BURST, M_WAIT_GO} mstate_e;
  mstate_e       st;
  logic [KW-1:0] word_idx;    // index of the next word to write in this frame
  logic [PW:0]   beats_left;  // beats of the current burst not yet acknowledged
  logic          beat_done;
  logic          last_word;

  assign beat_done = wb_o.stb && wb_i.ack;
  assign pop       = beat_done;
  assign last_word = (word_idx == KW'(WORDS - 1));

  // Words left in this frame: a burst never runs past the end of the frame.
  logic [KW-1:0] room;
  assign room = KW'(WORDS) - word_idx;

  always_comb begin
    wb_o     = WB_M2S_IDLE;
    wb_o.we  = 1'b1;
    wb_o.sel = '1;
    wb_o.adr = MEM_AW'(BASE) + MEM_AW'(word_idx);
    wb_o.dat = fifo[rd_ptr];
    wb_o.bte = BTE_LINEAR;
    if (st == M_SINGLE) begin
      wb_o.cyc = 1'b1;
      wb_o.stb = 1'b1;
      wb_o.cti = CTI_CLASSIC;
    end else if (st == M_BURST) begin
      wb_o.cyc = 1'b1;
      wb_o.stb = 1'b1;
      wb_o.cti = (beats_left == 1) ? CTI_EOB : CTI_INCR;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st             <= M_IDLE;
      word_idx       <= '0;
      beats_left     <= '0;
      rd_ptr         <= '0;
      wr_ptr         <= '0;
      count          <= '0;
      frame_done     <= 1'b0;
      overflow       <= 1'b0;
      burst_started  <= 1'b0;
      single_started <= 1'b0;
    end else begin
      frame_done     <= 1'b0;
      burst_started  <= 1'b0;
      single_started <= 1'b0;
      overflow       <= push && full && !pop;
      if (push && (!full || pop)) wr_ptr <= wr_ptr + 1'b1;
      if (pop) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (PW+1)'(push && (!full || pop)) - (PW+1)'(pop);

      unique case (st)
        M_IDLE: begin
          if (count == 0 || ((PW+1)'(BURST_MIN) > count && KW'(count) < room)) begin
            // keep collecting words
          end else if (count > 1) begin
            st            <= M_BURST;
            beats_left    <= (KW'(count) > room) ? (PW+1)'(room) : count;
            burst_started <= 1'b1;
          end else if (count == 1) begin
            st             <= M_SINGLE;
            single_started <= 1'b1;
          end
        end
        M_SINGLE, M_BURST: begin
          if (beat_done) begin
            beats_left <= beats_left - 1'b1;
            if (last_word) begin
              word_idx   <= '0;
              frame_done <= 1'b1;
              st         <= M_WAIT_GO;
            end else begin
              word_idx <= word_idx + 1'b1;
              if (st == M_SINGLE || beats_left == 1) st <= M_IDLE;
            end
          end
        end
        M_WAIT_GO: if (frame_go) st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

  a_burst_ends_on_eob: assert property (@(posedge clk) disable iff (rst)
    (st == M_BURST) && beat_done && (beats_left == 1) |-> wb_o.cti == CTI_EOB)
    else $error("frame_writer: burst ended without end-of-burst");
endmodule
