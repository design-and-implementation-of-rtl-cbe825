// kims_pkg: constants and types shared by the KIMS link-interface RTL.
//
// The host sees the link interface as a block of eight I/O byte addresses at
// BASE (140h). Writes: BASE+0 mask (16 bit), BASE+2 control (8 bit),
// BASE+4 reset (pseudo register), BASE+6 link register. Reads: BASE+2
// fifo-empty (16 bit), BASE+4 fifo-full (16 bit), BASE+6 link register.
// The control register uses its low four bits: DIR (b0), DMA (b1), DAV (b2),
// WARN (b3). The register map follows the original card; the struct types
// and the one-bundle description of a link cable are this model's own.
package kims_pkg;

  // Default I/O base address of the register block.
  localparam logic [15:0] KIMS_BASE = 16'h0140;

  // Register offsets in the eight-byte block (address bits A2..A0).
  localparam logic [2:0] OFS_MASK   = 3'd0;  // write: mask register
  localparam logic [2:0] OFS_CTRL   = 3'd2;  // write: control, read: fifo-empty
  localparam logic [2:0] OFS_RESET  = 3'd4;  // write: reset, read: fifo-full
  localparam logic [2:0] OFS_LINK   = 3'd6;  // read/write: link register
  localparam logic [2:0] OFS_FEMPTY = 3'd2;
  localparam logic [2:0] OFS_FFULL  = 3'd4;

  // Links per card and cards per CE.
  localparam int unsigned LINKS_PER_CARD = 4;
  localparam int unsigned MAX_CARDS      = 4;

  // Depth and width of each link FIFO (one IDT7203-class device).
  localparam int unsigned FIFO_DEPTH = 2048;
  localparam int unsigned LINK_WIDTH = 8;

  // Low nibble of the control register; the upper nibble is don't-care.
  typedef struct packed {
    logic warn;  // b3: enable WARN interrupt (IRQ10)
    logic dav;   // b2: enable DAV interrupt (IRQ11)
    logic dma;   // b1: enable DMA request (DRQ3)
    logic dir;   // b0: DMA direction, 1 = link read, 0 = link write
  } ctrl_t;

  // Signals one side of a link cable drives towards the other side.
  // A cable connects the *_out bundle of one CE to the *_in bundle of the other.
  typedef struct packed {
    logic [LINK_WIDTH-1:0] data;  // head of this side's outgoing FIFO
    logic                  empty_n; // this side's FIFO empty flag, low = empty
    logic                  rd_n;    // read request into the other side's FIFO
  } link_wire_t;

endpackage
