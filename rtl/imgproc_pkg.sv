// Shared types and constants for the image-processing memory system.
//
// Holds the Wishbone bus bundles used between the frame writers/readers, the
// bank-swapping router and the ZBT SRAM controllers, the cycle-type codes of
// Wishbone registered-feedback cycles (CTI/BTE), and the geometry of the board
// memory (512K x 32-bit words per bank) and of the gesture-recognition frame
// (384 x 240 pixels). All Wishbone signals are active high; a master drives
// wb_m2s_t and a slave answers with wb_s2m_t.
package imgproc_pkg;

  // Board SRAM bank: 512K words of 32 bits, byte-writable.
  localparam int unsigned MEM_AW = 19;
  localparam int unsigned MEM_DW = 32;
  localparam int unsigned MEM_SW = MEM_DW / 8;

  // Gesture-recognition frame geometry.
  localparam int unsigned FRAME_W = 384;
  localparam int unsigned FRAME_H = 240;

  // Wishbone Cycle Type Identifier (CTI) codes.
  typedef enum logic [2:0] {
    CTI_CLASSIC  = 3'b000,
    CTI_CONST    = 3'b001,
    CTI_INCR     = 3'b010,
    CTI_EOB      = 3'b111
  } cti_e;

  // Wishbone Burst Type Extension (BTE) codes; only linear bursts are served.
  typedef enum logic [1:0] {
    BTE_LINEAR = 2'b00,
    BTE_WRAP4  = 2'b01,
    BTE_WRAP8  = 2'b10,
    BTE_WRAP16 = 2'b11
  } bte_e;

  // Master to slave.
  typedef struct packed {
    logic              cyc;
    logic              stb;
    logic              we;
    logic [MEM_AW-1:0] adr;   // word address
    logic [MEM_SW-1:0] sel;
    logic [MEM_DW-1:0] dat;
    logic [2:0]        cti;
    logic [1:0]        bte;
  } wb_m2s_t;

  // Slave to master.
  typedef struct packed {
    logic              ack;
    logic [MEM_DW-1:0] dat;
  } wb_s2m_t;

  localparam wb_m2s_t WB_M2S_IDLE = '{cyc: 1'b0, stb: 1'b0, we: 1'b0, adr: '0, sel: '0,
                                      dat: '0, cti: 3'b000, bte: 2'b00};

endpackage
