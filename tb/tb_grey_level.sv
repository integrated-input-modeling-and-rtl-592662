// Testbench for grey_level: drives random and corner-case RGB pixels with
// random gaps and random output back-pressure, and compares every output with
// the real-valued luma 0.299 R + 0.587 G + 0.114 B rounded to the nearest
// integer (the 8-bit fixed-point weights may differ from it by at most one),
// and checks that side data stays with its pixel and that the stage keeps one
// pixel per clock when nothing stalls it.
module tb_grey_level;
  import tb_imgref_pkg::*;

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] r, g, b, y;
  logic [7:0] side_i, side_o;

  grey_level #(.SIDE_W(8)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_r(r), .in_g(g), .in_b(b), .in_side(side_i),
    .out_valid, .out_ready, .out_y(y), .out_side(side_o)
  );

  int checks = 0, failures = 0, exact = 0;
  int exp_y[$];
  int exp_s[$];
  int n_out = 0;
  bit backpressure = 1'b1;
  localparam int N = 3000;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: random ready, compare in order.
  // Outputs are sampled at the falling edge; the transfer happens at the next rising edge.
  always @(negedge clk) begin
    if (!rst && out_valid && out_ready) begin
      int e, s, dlt;
      e = exp_y.pop_front();
      s = exp_s.pop_front();
      dlt = int'(y) - e;
      checks++;
      if (dlt > 1 || dlt < -1 || int'(side_o) != s) begin
        failures++;
        $display("FAIL: t=%0t y=%0d exp %0d side %0d exp %0d q=%0d", $time, y, e, side_o, s, exp_y.size());
      end
      if (dlt == 0) exact++;
      n_out++;
    end
  end

  always @(posedge clk) #1 out_ready = backpressure ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic send(int rr, int gg, int bb);
    r = 8'(rr); g = 8'(gg); b = 8'(bb); side_i = 8'($urandom);
    in_valid = 1'b1;
    begin bit ok; do begin @(negedge clk); ok = in_ready; @(posedge clk); end while (!ok); end
    exp_y.push_back(ref_grey(rr, gg, bb));
    exp_s.push_back(int'(side_i));
    #1 in_valid = 1'b0;
  endtask

  initial begin
    int t0, t1;
    in_valid = 0; out_ready = 1; r = 0; g = 0; b = 0; side_i = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    send(0, 0, 0); send(255, 255, 255); send(255, 0, 0); send(0, 255, 0); send(0, 0, 255);
    for (int i = 0; i < N; i++) begin
      send($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
      if ($urandom_range(0, 4) == 0) begin repeat ($urandom_range(1, 3)) @(posedge clk); #1; end
    end
    wait (exp_y.size() == 0); @(posedge clk); #1;
    // Throughput: 64 back-to-back pixels without back-pressure take 64 clocks.
    backpressure = 1'b0;
    repeat (2) @(posedge clk); #1;
    t0 = int'($time / 10);
    for (int i = 0; i < 64; i++) send(i, 2 * i, 3 * i);
    t1 = int'($time / 10);
    checks++;
    if (t1 - t0 != 64) begin
      failures++;
      $display("FAIL: 64 pixels took %0d clocks, expected 64", t1 - t0);
    end
    wait (exp_y.size() == 0); @(posedge clk); #1;
    // Most results must equal the rounded real value.
    checks++;
    if (exact < (N * 3) / 4) begin failures++; $display("FAIL: only %0d exact", exact); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
