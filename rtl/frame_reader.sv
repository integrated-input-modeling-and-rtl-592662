// Frame reader: the read port through which the Contour stage fetches words
// of one Region output image from the bank that currently holds the
// previous frame.
//
// A request gives a word address (relative to BASE) and a length of 1 to
// MAXLEN words. A length of one becomes a single Wishbone read; a longer
// request becomes a linear incrementing burst with end-of-burst on the last
// beat, so that a sequential scan costs about one clock per word after the
// first. The words come back in order on rd_valid/rd_data, rd_last marking
// the final word of the request; the receiver cannot hold them back. A new
// request is taken only when the previous one has returned all its words
// (req_ready high).
//
// Interface: request handshake (req_valid/req_ready), read data stream, and a
// Wishbone master (wb_o, wb_i) in the registered-feedback form served by
// wb_zbt_ctrl. The request format is this design's choice: the Contour stage
// that uses it is not specified beyond its access pattern (a scan, then
// accesses around contours).
module frame_reader
  import imgproc_pkg::*;
#(
  parameter int unsigned BASE   = 0,
  parameter int unsigned MAXLEN = 256,
  localparam int unsigned LW    = $clog2(MAXLEN + 1)
) (
  input  logic              clk,
  input  logic              rst,          // asynchronous, active high
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [MEM_AW-1:0] req_addr,
  input  logic [LW-1:0]     req_len,      // 1..MAXLEN
  output logic              rd_valid,
  output logic [31:0]       rd_data,
  output logic              rd_last,
  output wb_m2s_t           wb_o,
  input  wb_s2m_t           wb_i
);
  logic              busy;
  logic [MEM_AW-1:0] adr;
  logic [LW-1:0]     left;     // beats not yet acknowledged
  logic              burst;
  logic              beat;

  assign req_ready = !busy;
  assign beat      = busy && wb_i.ack;

  always_comb begin
    wb_o     = WB_M2S_IDLE;
    wb_o.cyc = busy;
    wb_o.stb = busy;
    wb_o.we  = 1'b0;
    wb_o.sel = '1;
    wb_o.adr = adr;
    wb_o.bte = BTE_LINEAR;
    wb_o.cti = !burst ? CTI_CLASSIC : ((left == 1) ? CTI_EOB : CTI_INCR);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy     <= 1'b0;
      adr      <= '0;
      left     <= '0;
      burst    <= 1'b0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
      rd_last  <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      rd_last  <= 1'b0;
      if (!busy) begin
        if (req_valid && req_len != 0) begin
          busy  <= 1'b1;
          adr   <= MEM_AW'(BASE) + req_addr;
          left  <= req_len;
          burst <= (req_len > 1);
        end
      end else if (beat) begin
        rd_valid <= 1'b1;
        rd_data  <= wb_i.dat;
        rd_last  <= (left == 1);
        adr      <= adr + 1'b1;
        left     <= left - 1'b1;
        if (left == 1) busy <= 1'b0;
      end
    end
  end
endmodule
