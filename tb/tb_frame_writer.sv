// Testbench for frame_writer with a wb_zbt_ctrl and the SRAM model behind it,
// on a small frame (20 x 5 pixels = 25 words, so the last word of a frame
// is written alone). Pixels arrive every second
// clock like the video path. Checks: after frame_done every word of the bank
// holds the frame's pixels packed little endian at BASE + k; the writer holds
// the next frame's words until frame_go and then writes them; both single
// writes and bursts (of at least BURST_MIN words) are used; a frame_go held back long enough overflows the
// FIFO, which must be reported.
module tb_frame_writer;
  import imgproc_pkg::*;
  localparam int W = 20, H = 5, WORDS = W * H / 4, BASE = 100;

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  logic iv, isof, fdone, fgo, ovf, bst, sst;
  logic [7:0] ipix;
  wb_m2s_t m;
  wb_s2m_t s;
  logic [18:0] ma; logic mce, mwe, madv, moe, mdqoe, sdqen; logic [3:0] mbw; logic [31:0] mdqo, sdq;

  frame_writer #(.W(W), .H(H), .BASE(BASE), .DEPTH(8), .BURST_MIN(4)) dut (
    .clk, .rst, .in_valid(iv), .in_sof(isof), .in_pix(ipix), .wb_o(m), .wb_i(s),
    .frame_done(fdone), .frame_go(fgo), .overflow(ovf), .burst_started(bst), .single_started(sst)
  );
  wb_zbt_ctrl ctrl (
    .clk_i(clk), .rst_i(rst), .cyc_i(m.cyc), .stb_i(m.stb), .we_i(m.we), .adr_i(m.adr),
    .sel_i(m.sel), .dat_i(m.dat), .cti_i(m.cti), .bte_i(m.bte), .dat_o(s.dat), .ack_o(s.ack),
    .mem_addr(ma), .mem_ce_n(mce), .mem_we_n(mwe), .mem_bw_n(mbw), .mem_adv_ld_n(madv),
    .mem_oe_n(moe), .mem_dq_o(mdqo), .mem_dq_oe(mdqoe), .mem_dq_i(sdq)
  );
  zbt_sram_model #(.AW(19)) sram (
    .clk, .addr(ma), .ce_n(mce), .we_n(mwe), .bw_n(mbw), .adv_ld_n(madv), .oe_n(moe),
    .dq_i(mdqo), .dq_i_en(mdqoe), .dq_o(sdq), .dq_o_en(sdqen)
  );

  int checks = 0, failures = 0, dones = 0, bursts = 0, singles = 0, ovfs = 0;
  always @(negedge clk) if (!rst) begin
    if (fdone) dones++;
    if (bst) bursts++;
    if (sst) singles++;
    if (ovf) ovfs++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame(ref logic [7:0] px[W * H], input int gap);
    foreach (px[i]) begin
      ipix = px[i]; isof = (i == 0); iv = 1'b1;
      @(posedge clk); #1;
      iv = 1'b0; isof = 1'b0;
      repeat (gap) begin @(posedge clk); #1; end
    end
  endtask

  task automatic check_bank(ref logic [7:0] px[W * H], input string tag);
    for (int k = 0; k < WORDS; k++)
      check(sram.mem[BASE + k] == {px[4*k+3], px[4*k+2], px[4*k+1], px[4*k]},
            $sformatf("%s word %0d = %08h", tag, k, sram.mem[BASE + k]));
  endtask

  logic [7:0] f1 [W * H];
  logic [7:0] f2 [W * H];

  initial begin
    iv = 0; isof = 0; ipix = 0; fgo = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    foreach (f1[i]) f1[i] = 8'($urandom);
    foreach (f2[i]) f2[i] = 8'($urandom);
    // Frame 1 at the video pixel rate (one pixel every second clock).
    send_frame(f1, 1);
    repeat (20) @(posedge clk); #1;
    check(dones == 1, "frame_done after frame 1");
    check_bank(f1, "frame 1");
    // Frame 2 arrives back-to-back while frame_go is withheld: first 8 words
    // wait in the FIFO (no word may be written before frame_go).
    fork
      send_frame(f2, 0);
      begin
        repeat (20) @(posedge clk);
        #1;
        check(sram.mem[BASE] == {f1[3], f1[2], f1[1], f1[0]}, "no write before frame_go");
        fgo = 1'b1; @(posedge clk); #1; fgo = 1'b0;
      end
    join
    repeat (30) @(posedge clk); #1;
    check(dones == 2, "frame_done after frame 2");
    check_bank(f2, "frame 2");
    check(bursts > 0 && singles > 0, $sformatf("bursts %0d singles %0d", bursts, singles));
    check(ovfs == 0, "no overflow so far");
    // Frame 3 with frame_go withheld for the whole frame: the FIFO overflows.
    send_frame(f1, 0);
    repeat (30) @(posedge clk); #1;
    check(ovfs > 0, "overflow reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
