// Testbench for bank_swap with four simple Wishbone slaves that answer every
// access with their bank number and the address. Checks that each writer and
// reader reaches the bank its pair role gives it, that the pairs swap when
// both writers report a finished frame and the reader side is free (with
// frame_go and rd_frame_ready pulses), that a frame finished while the reader
// is busy is dropped (no swap, counter up, frame_go still given), and that a
// reader finishing in the same clock as the writers still lets the swap
// happen.
module tb_bank_swap;
  import imgproc_pkg::*;

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  wb_m2s_t wr_m [2], rd_m [2], bank_m [4];
  wb_s2m_t wr_s [2], rd_s [2], bank_s [4];
  logic [1:0] wdone;
  logic go, rready, rdone, pair, busy;
  logic [15:0] dropped;

  bank_swap dut (
    .clk, .rst, .wr_m, .wr_s, .wr_frame_done(wdone), .frame_go(go),
    .rd_m, .rd_s, .rd_frame_ready(rready), .rd_frame_done(rdone),
    .bank_m, .bank_s, .wr_pair(pair), .rd_busy(busy), .frames_dropped(dropped)
  );

  // Slaves: acknowledge one clock after a request, data = bank number and address.
  for (genvar b = 0; b < 4; b++) begin : g_slave
    always_ff @(posedge clk) begin
      bank_s[b].ack <= bank_m[b].cyc && bank_m[b].stb && !bank_s[b].ack;
      bank_s[b].dat <= {8'(b), 5'd0, bank_m[b].adr};
    end
  end

  int checks = 0, failures = 0, gos = 0, readys = 0;
  always @(negedge clk) if (!rst) begin
    if (go) gos++;
    if (rready) readys++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One access by writer (is_rd = 0) or reader (is_rd = 1) k; returns the bank that answered.
  task automatic access(bit is_rd, int k, output int bank);
    logic [18:0] a;
    bit ok;
    a = 19'($urandom);
    if (is_rd) begin rd_m[k].cyc = 1; rd_m[k].stb = 1; rd_m[k].adr = a; end
    else       begin wr_m[k].cyc = 1; wr_m[k].stb = 1; wr_m[k].adr = a; wr_m[k].we = 1; end
    do begin
      @(negedge clk);
      ok = is_rd ? rd_s[k].ack : wr_s[k].ack;
      bank = is_rd ? int'(rd_s[k].dat[31:24]) : int'(wr_s[k].dat[31:24]);
      if (ok) check((is_rd ? rd_s[k].dat[18:0] : wr_s[k].dat[18:0]) == a, "address routed");
      @(posedge clk);
    end while (!ok);
    #1;
    if (is_rd) rd_m[k] = WB_M2S_IDLE; else wr_m[k] = WB_M2S_IDLE;
  endtask

  task automatic check_routes(int exp_wpair, string tag);
    int bank;
    for (int k = 0; k < 2; k++) begin
      access(0, k, bank);
      check(bank == 2 * exp_wpair + k, $sformatf("%s: writer %0d reached bank %0d", tag, k, bank));
      access(1, k, bank);
      check(bank == 2 * (1 - exp_wpair) + k, $sformatf("%s: reader %0d reached bank %0d", tag, k, bank));
    end
    check(int'(pair) == exp_wpair, $sformatf("%s: wr_pair %0d", tag, pair));
  endtask

  task automatic pulse_done(bit both_same_clock, bit with_rdone);
    if (both_same_clock) begin
      wdone = 2'b11; rdone = with_rdone;
      @(posedge clk); #1 wdone = 0; rdone = 0;
    end else begin
      wdone = 2'b01; @(posedge clk); #1 wdone = 0;
      repeat (3) @(posedge clk); #1;
      wdone = 2'b10; rdone = with_rdone; @(posedge clk); #1 wdone = 0; rdone = 0;
    end
    repeat (2) @(posedge clk); #1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_m[0] = WB_M2S_IDLE; wr_m[1] = WB_M2S_IDLE; rd_m[0] = WB_M2S_IDLE; rd_m[1] = WB_M2S_IDLE;
    wdone = 0; rdone = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check_routes(0, "after reset");
    // Frame 1 written (images finish at different clocks): swap.
    pulse_done(0, 0);
    check(gos == 1 && readys == 1 && busy, "first swap");
    check_routes(1, "after first swap");
    // Frame 2 written while the reader is busy: dropped, no swap.
    pulse_done(1, 0);
    check(gos == 2 && readys == 1 && dropped == 1, $sformatf("drop: go %0d ready %0d dropped %0d", gos, readys, dropped));
    check_routes(1, "after drop");
    // Reader done in the same clock as the writers: swap.
    pulse_done(0, 1);
    check(gos == 3 && readys == 2 && dropped == 1 && busy, "swap with simultaneous reader done");
    check_routes(0, "after second swap");
    // Reader done first, then the writers: swap.
    rdone = 1; @(posedge clk); #1 rdone = 0;
    check(!busy, "reader released");
    pulse_done(1, 0);
    check(gos == 4 && readys == 3, "third swap");
    check_routes(1, "after third swap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
