// Testbench for frame_reader with a wb_zbt_ctrl and the SRAM model behind it
// (contents are the model's known start-up pattern). Random requests of 1 to
// 40 words at random addresses, issued whenever req_ready allows, must return
// exactly the requested words in order, rd_last on the final one, and a
// request of L > 1 words must complete in L + 5 clocks from acceptance (burst
// at one word per clock), a single word in 6.
module tb_frame_reader;
  import imgproc_pkg::*;
  localparam int BASE = 1000;
  localparam logic [31:0] SEED = 32'h0BAD_F00D;

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  logic rv, rr, dv, dl;
  logic [18:0] ra;
  logic [8:0] rl;
  logic [31:0] dd;
  wb_m2s_t m;
  wb_s2m_t s;
  logic [18:0] ma; logic mce, mwe, madv, moe, mdqoe, sdqen; logic [3:0] mbw; logic [31:0] mdqo, sdq;

  frame_reader #(.BASE(BASE), .MAXLEN(256)) dut (
    .clk, .rst, .req_valid(rv), .req_ready(rr), .req_addr(ra), .req_len(rl),
    .rd_valid(dv), .rd_data(dd), .rd_last(dl), .wb_o(m), .wb_i(s)
  );
  wb_zbt_ctrl ctrl (
    .clk_i(clk), .rst_i(rst), .cyc_i(m.cyc), .stb_i(m.stb), .we_i(m.we), .adr_i(m.adr),
    .sel_i(m.sel), .dat_i(m.dat), .cti_i(m.cti), .bte_i(m.bte), .dat_o(s.dat), .ack_o(s.ack),
    .mem_addr(ma), .mem_ce_n(mce), .mem_we_n(mwe), .mem_bw_n(mbw), .mem_adv_ld_n(madv),
    .mem_oe_n(moe), .mem_dq_o(mdqo), .mem_dq_oe(mdqoe), .mem_dq_i(sdq)
  );
  zbt_sram_model #(.AW(19), .INIT_SEED(SEED)) sram (
    .clk, .addr(ma), .ce_n(mce), .we_n(mwe), .bw_n(mbw), .adv_ld_n(madv), .oe_n(moe),
    .dq_i(mdqo), .dq_i_en(mdqoe), .dq_o(sdq), .dq_o_en(sdqen)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] word(int a);
    return SEED ^ (32'(a) * 32'h9E3779B1);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rv = 0; ra = 0; rl = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int r = 0; r < 200; r++) begin
      int a, l, got, t0, t1;
      bit ok;
      a = $urandom_range(0, 30000);
      l = (r % 5 == 0) ? 1 : $urandom_range(2, 40);
      ra = 19'(a); rl = 9'(l); rv = 1'b1;
      do begin @(negedge clk); ok = rr; @(posedge clk); end while (!ok);
      t0 = int'($time / 10);
      #1 rv = 1'b0;
      got = 0;
      while (got < l) begin
        @(negedge clk);
        if (dv) begin
          check(dd == word(BASE + a + got), $sformatf("req %0d word %0d = %08h", r, got, dd));
          check(dl == (got == l - 1), "rd_last placement");
          got++;
        end
      end
      t1 = int'($time / 10);
      check(t1 - t0 == ((l == 1) ? 6 : l + 5),
            $sformatf("request of %0d took %0d clocks", l, t1 - t0));
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
