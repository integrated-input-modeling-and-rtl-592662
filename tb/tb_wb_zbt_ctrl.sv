// Self-checking testbench for wb_zbt_ctrl against the ZBT SRAM model.
//
// A Wishbone master written as tasks issues single reads and writes (with
// random byte selects), linear incrementing bursts of random length, and
// random mixes of both. A shadow copy of the memory, kept by the testbench
// alone, predicts every read. Cycle counts are checked: 5 clocks for a single
// read, 4 for a single write, and one word per clock inside a burst (first
// read word after 5 clocks, first write acknowledge after 1). The master
// drives one time unit after a rising edge and samples the slave's registered
// outputs at the falling edge before the next rising edge.
module tb_wb_zbt_ctrl;
  import imgproc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #5 clk = ~clk;
  initial #1 rst = 1'b1;   // asynchronous reset before the first clock edge

  logic        cyc, stb, we;
  logic [18:0] adr;
  logic [3:0]  sel;
  logic [31:0] wdat, rdat;
  logic [2:0]  cti;
  logic [1:0]  bte;
  logic        ack;

  logic [18:0] m_addr;
  logic        m_ce_n, m_we_n, m_adv_ld_n, m_oe_n, m_dq_oe, s_dq_en;
  logic [3:0]  m_bw_n;
  logic [31:0] m_dq_o, s_dq;

  wb_zbt_ctrl dut (
    .clk_i(clk), .rst_i(rst),
    .cyc_i(cyc), .stb_i(stb), .we_i(we), .adr_i(adr), .sel_i(sel), .dat_i(wdat),
    .cti_i(cti), .bte_i(bte), .dat_o(rdat), .ack_o(ack),
    .mem_addr(m_addr), .mem_ce_n(m_ce_n), .mem_we_n(m_we_n), .mem_bw_n(m_bw_n),
    .mem_adv_ld_n(m_adv_ld_n), .mem_oe_n(m_oe_n), .mem_dq_o(m_dq_o),
    .mem_dq_oe(m_dq_oe), .mem_dq_i(s_dq)
  );

  zbt_sram_model #(.AW(19), .DW(32), .INIT_SEED(32'h1234_5678)) sram (
    .clk(clk), .addr(m_addr), .ce_n(m_ce_n), .we_n(m_we_n), .bw_n(m_bw_n),
    .adv_ld_n(m_adv_ld_n), .oe_n(m_oe_n), .dq_i(m_dq_o), .dq_i_en(m_dq_oe),
    .dq_o(s_dq), .dq_o_en(s_dq_en)
  );

  int checks = 0, failures = 0;
  logic [31:0] shadow [logic [18:0]];

  function automatic logic [31:0] expect_word(logic [18:0] a);
    if (shadow.exists(a)) return shadow[a];
    return 32'h1234_5678 ^ (32'(a) * 32'h9E3779B1);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One clock: sample the slave at the falling edge, then pass the rising edge.
  task automatic tick(output logic a, output logic [31:0] d);
    @(negedge clk);
    a = ack;
    d = rdat;
    @(posedge clk);
    #1;
  endtask

  task automatic idle_bus();
    cyc = 0; stb = 0; we = 0; cti = CTI_CLASSIC; bte = BTE_LINEAR; sel = '0;
  endtask

  task automatic single_read(logic [18:0] a);
    logic k; logic [31:0] d; int n = 0;
    cyc = 1; stb = 1; we = 0; adr = a; cti = CTI_CLASSIC; sel = 4'hF;
    do begin tick(k, d); n++; end while (!k && n < 50);
    idle_bus();
    check(d == expect_word(a), $sformatf("single read %05h got %08h exp %08h", a, d, expect_word(a)));
    check(n == 5, $sformatf("single read took %0d clocks, expected 5", n));
  endtask

  task automatic single_write(logic [18:0] a, logic [31:0] v, logic [3:0] s);
    logic k; logic [31:0] d; int n = 0; logic [31:0] old;
    cyc = 1; stb = 1; we = 1; adr = a; wdat = v; sel = s; cti = CTI_CLASSIC;
    do begin tick(k, d); n++; end while (!k && n < 50);
    idle_bus();
    old = expect_word(a);
    for (int b = 0; b < 4; b++) if (s[b]) old[b*8 +: 8] = v[b*8 +: 8];
    shadow[a] = old;
    check(n == 4, $sformatf("single write took %0d clocks, expected 4", n));
  endtask

  task automatic burst_read(logic [18:0] a, int len);
    logic k; logic [31:0] d; int n = 0, beat = 0, first = 0;
    cyc = 1; stb = 1; we = 0; adr = a; sel = 4'hF; bte = BTE_LINEAR;
    cti = (len == 1) ? CTI_EOB : CTI_INCR;
    while (beat < len && n < 200) begin
      tick(k, d); n++;
      if (k) begin
        if (beat == 0) first = n;
        check(d == expect_word(a + 19'(beat)),
              $sformatf("burst read %05h+%0d got %08h exp %08h", a, beat, d, expect_word(a + 19'(beat))));
        beat++;
        adr = a + 19'(beat);
        cti = (beat == len - 1) ? CTI_EOB : CTI_INCR;
      end
    end
    idle_bus();
    check(beat == len, "burst read completed");
    check(first == 5, $sformatf("burst read first word after %0d clocks, expected 5", first));
    check(n == len + 4, $sformatf("burst read of %0d took %0d clocks, expected %0d", len, n, len + 4));
  endtask

  task automatic burst_write(logic [18:0] a, int len);
    logic k; logic [31:0] d; int n = 0, beat = 0;
    logic [31:0] v;
    cyc = 1; stb = 1; we = 1; adr = a; sel = 4'hF; bte = BTE_LINEAR;
    v = $urandom; wdat = v;
    cti = (len == 1) ? CTI_EOB : CTI_INCR;
    while (beat < len && n < 200) begin
      tick(k, d); n++;
      if (k) begin
        shadow[a + 19'(beat)] = v;
        beat++;
        adr = a + 19'(beat);
        v = $urandom; wdat = v;
        cti = (beat == len - 1) ? CTI_EOB : CTI_INCR;
      end
    end
    idle_bus();
    check(beat == len, "burst write completed");
    // A one-beat burst starts with CTI end-of-burst and is served as a single write.
    check(n == ((len == 1) ? 4 : len + 1),
          $sformatf("burst write of %0d took %0d clocks", len, n));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle_bus(); adr = '0; wdat = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;

    // Directed: unwritten data, full-word and byte writes, read after write.
    single_read(19'h00010);
    single_write(19'h00010, 32'hDEAD_BEEF, 4'hF);
    single_read(19'h00010);
    single_write(19'h00010, 32'h1122_3344, 4'b0101);
    single_read(19'h00010);
    single_write(19'h7FFFF, 32'hA5A5_0F0F, 4'b1000);
    single_read(19'h7FFFF);

    // Bursts, including one that wraps the address space and a length of one.
    burst_write(19'h00100, 8);
    burst_read(19'h00100, 8);
    burst_read(19'h000FE, 12);
    burst_write(19'h7FFFE, 4);
    burst_read(19'h7FFFC, 8);
    burst_write(19'h00200, 1);
    burst_read(19'h00200, 1);

    // A burst read must not leave prefetched words acknowledged afterwards.
    burst_read(19'h00300, 3);
    single_read(19'h00400);

    // Random mix over a small window so that reads hit earlier writes.
    for (int i = 0; i < 300; i++) begin
      logic [18:0] a;
      a = 19'h01000 + 19'($urandom_range(0, 63));
      case ($urandom_range(0, 3))
        0: single_read(a);
        1: single_write(a, $urandom, 4'($urandom_range(1, 15)));
        2: burst_read(a, $urandom_range(1, 16));
        default: burst_write(a, $urandom_range(1, 16));
      endcase
      if ($urandom_range(0, 3) == 0) begin repeat ($urandom_range(1, 3)) @(posedge clk); #1; end
      #0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
