// Testbench for video_acquire on a small frame: streams frames of 4:2:2
// samples (Cb Y Cr Y ...) with random idle gaps, then checks every emitted
// pixel's luma, shared chroma (8 MSBs of the 10-bit samples), position and
// start/end-of-frame flags against the testbench's own frame, checks that
// samples between frames are ignored, and that a start-of-frame in the middle
// of a frame restarts it and pulses resync.
module tb_video_acquire;
  localparam int W = 8, H = 4;

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  logic vv, vsof, pv, psof, peof, resync;
  logic [9:0] vd;
  logic [7:0] py, pcb, pcr;
  logic [$clog2(W)-1:0] pc;
  logic [$clog2(H)-1:0] pr;

  video_acquire #(.W(W), .H(H)) dut (
    .clk, .rst, .vid_valid(vv), .vid_sof(vsof), .vid_data(vd),
    .pix_valid(pv), .pix_y(py), .pix_cb(pcb), .pix_cr(pcr), .pix_col(pc), .pix_row(pr),
    .pix_sof(psof), .pix_eof(peof), .resync
  );

  int checks = 0, failures = 0, resyncs = 0;
  typedef struct { int y, cb, cr, col, row; bit sof, eof; } pix_t;
  pix_t exp_q[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && pv) begin
      pix_t e;
      if (exp_q.size() == 0) check(0, "unexpected pixel");
      else begin
        e = exp_q.pop_front();
        check(int'(py) == e.y && int'(pcb) == e.cb && int'(pcr) == e.cr &&
              int'(pc) == e.col && int'(pr) == e.row && psof == e.sof && peof == e.eof,
              $sformatf("pixel (%0d,%0d) y=%0d cb=%0d cr=%0d exp (%0d,%0d) %0d %0d %0d",
                        pr, pc, py, pcb, pcr, e.row, e.col, e.y, e.cb, e.cr));
      end
    end
    if (!rst && resync) resyncs++;
  end

  task automatic sample(int v, bit sof);
    vd = 10'(v); vsof = sof; vv = 1'b1;
    @(posedge clk); #1;
    vv = 1'b0; vsof = 1'b0;
    if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
  endtask

  // Sends npairs pixel pairs of a frame; records expected pixels if expect_it.
  task automatic send_frame(int npairs, bit expect_it);
    for (int p = 0; p < npairs; p++) begin
      int cb, y0, cr, y1;
      pix_t e;
      cb = $urandom_range(0, 1023); y0 = $urandom_range(0, 1023);
      cr = $urandom_range(0, 1023); y1 = $urandom_range(0, 1023);
      if (expect_it) begin
        e.cb = cb >> 2; e.cr = cr >> 2;
        e.y = y0 >> 2; e.col = (2 * p) % W; e.row = (2 * p) / W;
        e.sof = (p == 0); e.eof = 0;
        exp_q.push_back(e);
        e.y = y1 >> 2; e.col = (2 * p + 1) % W; e.row = (2 * p + 1) / W;
        e.sof = 0; e.eof = (p == W * H / 2 - 1);
        exp_q.push_back(e);
      end
      sample(cb, p == 0); sample(y0, 0); sample(cr, 0); sample(y1, 0);
    end
  endtask

  initial begin
    vv = 0; vsof = 0; vd = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // samples before any start of frame are ignored
    for (int i = 0; i < 6; i++) sample($urandom_range(0, 1023), 0);
    send_frame(W * H / 2, 1);
    // blanking samples after a complete frame are ignored
    for (int i = 0; i < 5; i++) sample($urandom_range(0, 1023), 0);
    send_frame(W * H / 2, 1);
    // an interrupted frame: its pixels come out, then the new frame restarts at (0,0)
    send_frame(3, 1);
    send_frame(W * H / 2, 1);
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d pixels missing", exp_q.size()));
    check(resyncs == 1, $sformatf("resync pulses %0d, expected 1", resyncs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
