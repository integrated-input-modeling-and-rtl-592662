// Difference stage: the absolute difference of two grey levels, zeroed when
// it is below a threshold,
//   d = |a - b|  if |a - b| >= threshold,   d = 0  otherwise.
// A difference equal to the threshold is kept, as the reference algorithm
// zeroes only differences strictly below it. The threshold is a run-time
// input (values such as 15 or 60 are typical).
//
// One pixel per clock through a single register stage with a valid/ready
// handshake (latency one clock); SIDE_W bits of side data pass unchanged.
module diff_threshold #(
  parameter int unsigned SIDE_W = 8
) (
  input  logic              clk,
  input  logic              rst,        // asynchronous, active high
  input  logic [7:0]        threshold,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_a,
  input  logic [7:0]        in_b,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        out_d,
  output logic [SIDE_W-1:0] out_side
);
  logic [7:0] absdiff;

  always_comb absdiff = (in_a >= in_b) ? in_a - in_b : in_b - in_a;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_d     <= '0;
      out_side  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_d    <= (absdiff < threshold) ? 8'd0 : absdiff;
        out_side <= in_side;
      end
    end
  end
endmodule
