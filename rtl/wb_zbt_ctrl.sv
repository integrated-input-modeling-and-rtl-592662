// Wishbone slave controller for one bank of ZBT (zero bus turnaround)
// synchronous SRAM, 512K x 32 bits with byte writes.
//
// The Wishbone side follows the registered-feedback rules: ACK_O and DAT_O are
// registers, and the cycle type (CTI) tells the slave whether a single access
// or a linear incrementing burst is in progress. Classic cycles (CTI 000, and
// also 001 and 111 when they start a cycle) and bursts whose BTE is not linear
// are served as single accesses; CTI 010 with BTE 00 starts a linear burst.
//
// Inside, every SRAM access is a command register stage (C) followed by two
// data stages (D1, D2), matching a pipelined ZBT part: the SRAM samples the
// command at the clock edge that ends C, takes write data (or presents read
// data) at the edge that ends D2. One command can be issued every clock, so a
// burst moves one word per clock once the pipeline is full, while a single
// access pays the full pipeline latency. Counted from the cycle in which the
// master raises STB_I to the cycle in which ACK_O is high (inclusive):
//   single read  : 5 clocks      single write : 4 clocks
//   burst read   : 5 clocks to the first word, then one word per clock
//   burst write  : ACK_O from the second clock, then one word per clock
// These single-access latencies are those the source design reports for its
// registered-output controller; the C/D1/D2 pipeline that produces them, and
// the rule that a burst master must keep STB_I high until its end-of-burst
// beat (no wait states), are this implementation's choices. The state machine
// has an asynchronous reset, returns to IDLE after each cycle, and drops
// ACK_O when it leaves a cycle.
//
// Memory pins: the bidirectional data bus is split into mem_dq_o/mem_dq_i with
// output enable mem_dq_oe; names ending in _n are active low. mem_adv_ld_n is
// held low, so every command loads its own address (the chip's own burst
// counter is not used); mem_oe_n is low whenever the controller does not
// drive the bus.
module wb_zbt_ctrl
  import imgproc_pkg::*;
#(
  parameter int unsigned AW = MEM_AW,
  parameter int unsigned DW = MEM_DW
) (
  input  logic            clk_i,
  input  logic            rst_i,       // asynchronous, active high
  // Wishbone slave
  input  logic            cyc_i,
  input  logic            stb_i,
  input  logic            we_i,
  input  logic [AW-1:0]   adr_i,       // word address
  input  logic [DW/8-1:0] sel_i,
  input  logic [DW-1:0]   dat_i,
  input  logic [2:0]      cti_i,
  input  logic [1:0]      bte_i,
  output logic [DW-1:0]   dat_o,
  output logic            ack_o,
  // ZBT SRAM bank
  output logic [AW-1:0]   mem_addr,
  output logic            mem_ce_n,
  output logic            mem_we_n,
  output logic [DW/8-1:0] mem_bw_n,
  output logic            mem_adv_ld_n,
  output logic            mem_oe_n,
  output logic [DW-1:0]   mem_dq_o,
  output logic            mem_dq_oe,
  input  logic [DW-1:0]   mem_dq_i
);

  typedef enum logic [2:0] {
    S_IDLE,       // wait for CYC_I & STB_I
    S_SINGLE_RD,  // single read in flight
    S_SINGLE_WR,  // single write in flight
    S_ACK,        // single access acknowledged, drop ACK_O
    S_BURST_RD,   // linear incrementing read burst
    S_BURST_WR    // linear incrementing write burst
  } state_e;

  state_e state;

  // Command stage C (drives the SRAM control pins) and data stages D1, D2.
  logic            c_valid, c_we, c_live;
  logic [DW/8-1:0] c_sel;
  logic [DW-1:0]   c_wdata;
  logic            d1_valid, d1_we, d1_live;
  logic [DW-1:0]   d1_wdata;
  logic            d2_valid, d2_we, d2_live;
  logic [DW-1:0]   d2_wdata;

  logic [AW-1:0]   burst_adr;   // next address of a read burst

  // Issue request for this clock edge.
  logic            iss;
  logic            iss_we;
  logic [AW-1:0]   iss_adr;
  logic            flush;       // drop reads still in flight (burst over)
  logic            kill;        // earlier accesses no longer belong to the current cycle

  logic req, is_burst, xfer, rd_return;
  assign req       = cyc_i & stb_i;
  assign is_burst  = (cti_i == CTI_INCR) && (bte_i == BTE_LINEAR);
  assign xfer      = req & ack_o;                      // a beat completes at this edge
  assign rd_return = d2_valid & ~d2_we & d2_live;      // read data on mem_dq_i now

  always_comb begin
    iss     = 1'b0;
    iss_we  = we_i;
    iss_adr = adr_i;
    flush   = 1'b0;
    unique case (state)
      S_IDLE: begin
        // A write burst waits for its first acknowledged beat; all else issues now.
        iss = req & ~(is_burst & we_i);
      end
      S_BURST_RD: begin
        iss_we  = 1'b0;
        iss_adr = burst_adr;
        flush   = ~req | (xfer & (cti_i == CTI_EOB));
        iss     = ~flush;
      end
      S_BURST_WR: begin
        iss_we = 1'b1;
        iss    = xfer;
      end
      default: ;
    endcase
    kill = flush | ((state == S_IDLE) & req);
  end

  // Wishbone-side state machine.
  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      state     <= S_IDLE;
      ack_o     <= 1'b0;
      dat_o     <= '0;
      burst_adr <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          ack_o <= 1'b0;
          if (req) begin
            if (is_burst && we_i) begin
              state <= S_BURST_WR;
              ack_o <= 1'b1;
            end else if (is_burst) begin
              state     <= S_BURST_RD;
              burst_adr <= adr_i + 1'b1;
            end else begin
              state <= we_i ? S_SINGLE_WR : S_SINGLE_RD;
            end
          end
        end
        S_SINGLE_RD: begin
          if (rd_return) begin
            dat_o <= mem_dq_i;
            ack_o <= 1'b1;
            state <= S_ACK;
          end
        end
        S_SINGLE_WR: begin
          // Acknowledge so that the master sees ACK_O at the edge at which the
          // SRAM takes the write data.
          if (d1_valid && d1_we && d1_live) begin
            ack_o <= 1'b1;
            state <= S_ACK;
          end
        end
        S_ACK: begin
          ack_o <= 1'b0;
          state <= S_IDLE;
        end
        S_BURST_RD: begin
          if (flush) begin
            ack_o <= 1'b0;
            state <= S_IDLE;
          end else begin
            burst_adr <= burst_adr + 1'b1;
            ack_o     <= rd_return;
            if (rd_return) dat_o <= mem_dq_i;
          end
        end
        S_BURST_WR: begin
          if (!req || (xfer && cti_i == CTI_EOB)) begin
            ack_o <= 1'b0;
            state <= S_IDLE;
          end
        end
        default: begin
          ack_o <= 1'b0;
          state <= S_IDLE;
        end
      endcase
    end
  end

  // SRAM command and data pipeline. Every access completes at the SRAM; the
  // live flags mark the accesses of the current Wishbone cycle, and are cleared
  // for older ones when a cycle starts and for prefetched reads when a burst
  // ends, so that only the current cycle's accesses are acknowledged.
  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      c_valid  <= 1'b0;
      c_we     <= 1'b0;
      c_live   <= 1'b0;
      c_sel    <= '0;
      c_wdata  <= '0;
      mem_addr <= '0;
      d1_valid <= 1'b0;
      d1_we    <= 1'b0;
      d1_live  <= 1'b0;
      d1_wdata <= '0;
      d2_valid <= 1'b0;
      d2_we    <= 1'b0;
      d2_live  <= 1'b0;
      d2_wdata <= '0;
    end else begin
      c_valid <= iss;
      c_we    <= iss & iss_we;
      c_live  <= iss;
      if (iss) begin
        mem_addr <= iss_adr;
        c_sel    <= iss_we ? sel_i : '1;
        c_wdata  <= dat_i;
      end
      d1_valid <= c_valid;
      d1_we    <= c_we;
      d1_live  <= c_live & ~kill;
      d1_wdata <= c_wdata;
      d2_valid <= d1_valid;
      d2_we    <= d1_we;
      d2_live  <= d1_live & ~kill;
      d2_wdata <= d1_wdata;
    end
  end

  assign mem_ce_n     = ~c_valid;
  assign mem_we_n     = ~(c_valid & c_we);
  assign mem_bw_n     = ~c_sel;
  assign mem_adv_ld_n = 1'b0;
  assign mem_dq_o     = d2_wdata;
  assign mem_dq_oe    = d2_valid & d2_we;
  assign mem_oe_n     = mem_dq_oe;

  // Wishbone rules this slave relies on.
  a_burst_no_wait: assert property (@(posedge clk_i) disable iff (rst_i)
    (state == S_BURST_RD || state == S_BURST_WR) && cyc_i |-> stb_i)
    else $error("wb_zbt_ctrl: master inserted a wait state inside a burst");
  a_ack_in_cycle: assert property (@(posedge clk_i) disable iff (rst_i)
    ack_o && (state == S_ACK) |-> cyc_i)
    else $error("wb_zbt_ctrl: master left a single cycle before its acknowledge");

endmodule
