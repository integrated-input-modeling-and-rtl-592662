// Behavioural model of a pipelined ZBT synchronous SRAM bank (512K x 32 with
// byte writes), for simulation only.
//
// A command is sampled at a rising clock edge when ce_n is low (adv_ld_n low:
// load the given address). For a read, the word is presented on dq_o from the
// following edge, so the controller samples it two edges after the command.
// For a write, the data and the byte-write strobes of the command are taken
// from dq_i two edges after the command. Writes are committed before reads
// are looked up at the same edge, so a read issued right after a write to the
// same word returns the new data, as the real part's internal forwarding
// does. At time zero every word holds INIT_SEED ^ (address * 32'h9E3779B1) so
// a testbench can predict unwritten contents.
module zbt_sram_model #(
  parameter int unsigned AW        = 19,
  parameter int unsigned DW        = 32,
  parameter logic [31:0] INIT_SEED = 32'h0
) (
  input  logic            clk,
  input  logic [AW-1:0]   addr,
  input  logic            ce_n,
  input  logic            we_n,
  input  logic [DW/8-1:0] bw_n,
  input  logic            adv_ld_n,
  input  logic            oe_n,
  input  logic [DW-1:0]   dq_i,      // data driven by the controller
  input  logic            dq_i_en,   // controller drives the bus
  output logic [DW-1:0]   dq_o,      // data driven by the SRAM
  output logic            dq_o_en
);
  logic [DW-1:0] mem [2**AW];

  // Two-deep command pipeline.
  logic            r1_v;
  logic [AW-1:0]   r1_a;
  logic            w1_v, w2_v;
  logic [AW-1:0]   w1_a, w2_a;
  logic [DW/8-1:0] w1_b, w2_b;
  logic            drive;

  int unsigned write_count, read_count;

  initial begin
    for (int unsigned i = 0; i < 2**AW; i++) mem[i] = INIT_SEED ^ (i * 32'h9E3779B1);
    r1_v = 1'b0; w1_v = 1'b0; w2_v = 1'b0; drive = 1'b0; dq_o = '0;
    r1_a = '0; w1_a = '0; w2_a = '0; w1_b = '0; w2_b = '0;
    write_count = 0; read_count = 0;
  end

  always @(posedge clk) begin
    if (w2_v) begin
      if (!dq_i_en) $error("zbt_sram_model: write data not driven");
      for (int b = 0; b < DW/8; b++)
        if (!w2_b[b]) mem[w2_a][b*8 +: 8] = dq_i[b*8 +: 8];
      write_count++;
    end
    if (r1_v) begin
      dq_o  <= mem[r1_a];
      read_count++;
    end
    drive <= r1_v;
    w2_v  = w1_v;  w2_a = w1_a;  w2_b = w1_b;
    w1_v  = !ce_n && !we_n && !adv_ld_n;
    w1_a  = addr;  w1_b = bw_n;
    r1_v  = !ce_n && we_n && !adv_ld_n;
    r1_a  = addr;
  end

  assign dq_o_en = drive && !oe_n;

  always @(posedge clk)
    if (dq_o_en && dq_i_en) $error("zbt_sram_model: data bus contention");
endmodule
