// Greylevel stage: converts an RGB pixel to its grey level (luma),
//   Y = 0.299 R + 0.587 G + 0.114 B,
// in fixed point as Y = (77 R + 150 G + 29 B + 128) >> 8. The weights are the
// standard coefficients scaled by 256 and sum to 256, so white stays 255 and
// the result is rounded to the nearest integer; the 8-bit weights are this
// design's choice of precision.
//
// One pixel per clock through a single register stage with a valid/ready
// handshake (latency one clock). SIDE_W bits of side data travel with the
// pixel unchanged, so a pipeline can carry other values alongside it.
module grey_level #(
  parameter int unsigned SIDE_W = 8
) (
  input  logic              clk,
  input  logic              rst,        // asynchronous, active high
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_r,
  input  logic [7:0]        in_g,
  input  logic [7:0]        in_b,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        out_y,
  output logic [SIDE_W-1:0] out_side
);
  logic [16:0] acc;

  always_comb
    acc = 17'(8'd77) * in_r + 17'(8'd150) * in_g + 17'(8'd29) * in_b + 17'd128;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_y     <= '0;
      out_side  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_y    <= acc[15:8];
        out_side <= in_side;
      end
    end
  end
endmodule
