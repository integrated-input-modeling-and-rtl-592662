// Video acquisition: turns the video decoder's multiplexed 4:2:2 YCbCr sample
// stream into a stream of numbered pixels for the Region stage.
//
// The decoder delivers 10-bit samples in the order Cb0 Y0 Cr0 Y1 Cb2 Y2 Cr2
// Y3 ..., one per sample-clock enable (27 MHz), so a new luma value arrives
// every second sample (13.5 MHz pixel rate) and each Cb/Cr pair is shared by
// two neighbouring pixels. Only the 8 most significant bits of every sample
// are kept. A pixel is emitted as soon as its three components are known:
// the even pixel of a pair when its Cr arrives, the odd pixel with its own
// luma. Pixels carry their column and row in a W x H frame, a start-of-frame
// flag on pixel (0,0) and an end-of-frame flag on the last pixel.
//
// Framing: vid_sof marks the Cb sample that starts a frame. After W x H
// pixels the block ignores samples until the next vid_sof; a vid_sof in the
// middle of a frame restarts the frame (resync pulses for one clock). The
// separate start-of-frame strobe and active-video qualifier are this design's
// choice of how the decoder's synchronisation reaches the block.
//
// Timing: pix_valid is registered, one clock after the sample that completes
// the pixel; at most one pixel every two enabled samples.
module video_acquire #(
  parameter int unsigned W = 384,
  parameter int unsigned H = 240
) (
  input  logic                 clk,
  input  logic                 rst,          // asynchronous, active high
  input  logic                 vid_valid,    // active-video sample present
  input  logic                 vid_sof,      // this sample is the first Cb of a frame
  input  logic [9:0]           vid_data,
  output logic                 pix_valid,
  output logic [7:0]           pix_y,
  output logic [7:0]           pix_cb,
  output logic [7:0]           pix_cr,
  output logic [$clog2(W)-1:0] pix_col,
  output logic [$clog2(H)-1:0] pix_row,
  output logic                 pix_sof,
  output logic                 pix_eof,
  output logic                 resync
);
  typedef enum logic [1:0] {PH_CB, PH_Y0, PH_CR, PH_Y1} phase_e;

  phase_e        phase;
  logic          active;     // inside a frame
  logic [7:0]    cb_q, y0_q, cr_q;
  logic [$clog2(W)-1:0] col;
  logic [$clog2(H)-1:0] row;
  logic [7:0]    s8;
  logic          emit;
  logic [7:0]    emit_y, emit_cr;

  assign s8 = vid_data[9:2];

  always_comb begin
    emit    = 1'b0;
    emit_y  = y0_q;
    emit_cr = cr_q;
    if (vid_valid && active && !vid_sof) begin
      if (phase == PH_CR) begin emit = 1'b1; emit_y = y0_q; emit_cr = s8; end
      if (phase == PH_Y1) begin emit = 1'b1; emit_y = s8;   emit_cr = cr_q; end
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase     <= PH_CB;
      active    <= 1'b0;
      cb_q      <= '0;
      y0_q      <= '0;
      cr_q      <= '0;
      col       <= '0;
      row       <= '0;
      pix_valid <= 1'b0;
      pix_y     <= '0;
      pix_cb    <= '0;
      pix_cr    <= '0;
      pix_col   <= '0;
      pix_row   <= '0;
      pix_sof   <= 1'b0;
      pix_eof   <= 1'b0;
      resync    <= 1'b0;
    end else begin
      pix_valid <= emit;
      resync    <= 1'b0;
      if (vid_valid && vid_sof) begin
        resync <= active;
        active <= 1'b1;
        cb_q   <= s8;
        phase  <= PH_Y0;
        col    <= '0;
        row    <= '0;
      end else if (vid_valid && active) begin
        unique case (phase)
          PH_CB: begin cb_q <= s8; phase <= PH_Y0; end
          PH_Y0: begin y0_q <= s8; phase <= PH_CR; end
          PH_CR: begin cr_q <= s8; phase <= PH_Y1; end
          PH_Y1: phase <= PH_CB;
        endcase
      end
      if (emit) begin
        pix_y   <= emit_y;
        pix_cb  <= cb_q;
        pix_cr  <= emit_cr;
        pix_col <= col;
        pix_row <= row;
        pix_sof <= (col == '0) && (row == '0);
        pix_eof <= (col == ($clog2(W))'(W - 1)) && (row == ($clog2(H))'(H - 1));
        if (col == ($clog2(W))'(W - 1)) begin
          col <= '0;
          if (row == ($clog2(H))'(H - 1)) begin
            row    <= '0;
            active <= 1'b0;
          end else begin
            row <= row + 1'b1;
          end
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end
endmodule
