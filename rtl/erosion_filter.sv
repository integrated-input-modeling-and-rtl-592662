// Noise-reduction stage: grey-level erosion of a W x H image streamed in
// raster order. Each interior pixel that is non-zero is replaced by the
// minimum of its four neighbours (up, down, left, right; the centre itself is
// not part of the minimum). Zero pixels and the pixels of the outer border
// (first and last row and column) pass unchanged. This is the erosion rule of
// the motion-detection algorithm; running the stage twice removes isolated
// noise of up to two pixels' width.
//
// How it works: two line buffers hold the previous row (r-1) and the current
// row (r). When the pixel of row r+1, column c arrives it is the lower
// neighbour of (r, c); the upper one is read from the previous-row buffer,
// the right one from the current-row buffer at c+1, and the left one from a
// register that kept the current-row value at c-1 before it was overwritten.
// Output row r is thus produced while row r+1 is input. After the last pixel
// of a frame the stage stops taking input (in_ready low) for W clocks while it
// emits the last row from its buffer; that flush is the only time it stalls
// its source. The next frame then starts at (0, 0).
//
// Interface: valid/ready on both sides, one pixel per clock at best; output
// latency is one row plus one clock. SIDE_W bits of side data travel with
// each pixel (they leave with the pixel they entered with). out_flush is high
// while the stage is draining its last row.
module erosion_filter #(
  parameter int unsigned W      = 408,
  parameter int unsigned H      = 306,
  parameter int unsigned SIDE_W = 8
) (
  input  logic              clk,
  input  logic              rst,        // asynchronous, active high
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_pix,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        out_pix,
  output logic [SIDE_W-1:0] out_side,
  output logic              out_flush
);
  localparam int unsigned XW = $clog2(W);
  localparam int unsigned YW = $clog2(H);

  logic [7:0]        lb_prev [W];
  logic [7:0]        lb_cur  [W];
  logic [SIDE_W-1:0] sb_cur  [W];
  logic [7:0]        left_hold;

  logic [XW-1:0] x;        // column of the next input pixel, or of the flush
  logic [YW-1:0] y;        // row of the next input pixel
  logic          flushing;

  logic can_out, fire_in, fire_flush, produce;
  logic [7:0] centre, up, left, right, down, mn, result;
  logic [SIDE_W-1:0] centre_side;
  logic border;

  assign can_out    = !out_valid || out_ready;
  assign in_ready   = !flushing && ((y == '0) || can_out);
  assign fire_in    = in_valid && in_ready;
  assign fire_flush = flushing && can_out;
  assign produce    = (fire_in && (y != '0)) || fire_flush;
  assign out_flush  = flushing;

  always_comb begin
    centre      = lb_cur[x];
    centre_side = sb_cur[x];
    up          = lb_prev[x];
    left        = left_hold;
    right       = (x == XW'(W - 1)) ? centre : lb_cur[x + 1'b1];
    down        = in_pix;
    mn          = (up < down) ? up : down;
    if (left  < mn) mn = left;
    if (right < mn) mn = right;
    // Output row is y-1 while taking input, H-1 (a border row) while flushing.
    border = flushing || (y == YW'(1)) || (x == '0) || (x == XW'(W - 1));
    result = (border || centre == 8'd0) ? centre : mn;
  end

  always_ff @(posedge clk) begin
    if (fire_in) begin
      lb_prev[x] <= lb_cur[x];
      lb_cur[x]  <= in_pix;
      sb_cur[x]  <= in_side;
      left_hold  <= lb_cur[x];
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      x         <= '0;
      y         <= '0;
      flushing  <= 1'b0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_side  <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (produce) begin
        out_valid <= 1'b1;
        out_pix   <= result;
        out_side  <= centre_side;
      end
      if (fire_in) begin
        if (x == XW'(W - 1)) begin
          x <= '0;
          if (y == YW'(H - 1)) flushing <= 1'b1;
          else                 y <= y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end else if (fire_flush) begin
        if (x == XW'(W - 1)) begin
          x        <= '0;
          y        <= '0;
          flushing <= 1'b0;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

endmodule
