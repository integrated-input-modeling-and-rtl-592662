// Testbench for diff_threshold: random grey pairs and thresholds (including
// differences equal to, one below and one above the threshold) with random
// gaps and output back-pressure; every output is compared with |a-b| zeroed
// below the threshold, and side data must stay with its pixel.
module tb_diff_threshold;
  import tb_imgref_pkg::*;

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] a, b, thr, d, side_i, side_o;

  diff_threshold #(.SIDE_W(8)) dut (
    .clk, .rst, .threshold(thr), .in_valid, .in_ready, .in_a(a), .in_b(b), .in_side(side_i),
    .out_valid, .out_ready, .out_d(d), .out_side(side_o)
  );

  int checks = 0, failures = 0, zeroed = 0, kept = 0;
  int exp_d[$];
  int exp_s[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Outputs are sampled at the falling edge; the transfer happens at the next rising edge.
  always @(negedge clk) begin
    if (!rst && out_valid && out_ready) begin
      int e, s;
      e = exp_d.pop_front();
      s = exp_s.pop_front();
      checks++;
      if (int'(d) != e || int'(side_o) != s) begin
        failures++;
        $display("FAIL: d=%0d exp %0d side %0d exp %0d", d, e, side_o, s);
      end
      if (e == 0) zeroed++; else kept++;
    end
  end

  always @(posedge clk) #1 out_ready = ($urandom_range(0, 3) != 0);

  task automatic send(int aa, int bb);
    a = 8'(aa); b = 8'(bb); side_i = 8'($urandom);
    in_valid = 1'b1;
    begin bit ok; do begin @(negedge clk); ok = in_ready; @(posedge clk); end while (!ok); end
    exp_d.push_back(ref_diff(aa, bb, int'(thr)));
    exp_s.push_back(int'(side_i));
    #1 in_valid = 1'b0;
  endtask

  initial begin
    in_valid = 0; out_ready = 1; a = 0; b = 0; side_i = 0; thr = 8'd15;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    send(100, 115); send(115, 100); send(100, 114); send(114, 100); send(100, 116);
    send(0, 255); send(255, 0); send(7, 7);
    for (int t = 0; t < 6; t++) begin
      thr = 8'(t == 0 ? 0 : (t == 5 ? 255 : $urandom_range(1, 254)));
      for (int i = 0; i < 500; i++) begin
        int x;
        x = $urandom_range(0, 255);
        send(x, (i % 3 == 0) ? ((x + int'(thr)) % 256) : $urandom_range(0, 255));
      end
      wait (exp_d.size() == 0); @(posedge clk); #1;
    end
    checks++;
    if (zeroed == 0 || kept == 0) begin failures++; $display("FAIL: both outcomes must occur"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
