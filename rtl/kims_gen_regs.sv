// kims_gen_regs: general registers of one KIMS card.
//
// Decodes, from gen_n, the strobes and address bits A2..A0, the write and
// read strobes of the general registers (the card's EPLD3) and holds the
// card's share of them:
//   * reset (write BASE+4): no storage; pulls fifo_reset_n low for the
//     write cycle, as does the bus reset line, which clears every link FIFO;
//   * control (write BASE+2): 4-bit CNTRL latch, loaded from cd[3:0] and
//     duplicated on every card;
//   * mask (write BASE+0): 4-bit MASK latch, loaded from the mask bus mx,
//     which carries nibble <card> of the 16-bit mask;
//   * fifo-empty (read BASE+2) and fifo-full (read BASE+4): the four link
//     status bits of this card, placed on both nibbles of cd so that
//     whichever transceiver is enabled sees them.
// iocs16_n tells the bus that a 16-bit register is addressed.
//
// Timing: a register loads on the rising clock edge that ends a bus cycle
// in which its write strobe is active (one clock per bus cycle); the read
// path is combinational. CNTRL and MASK are cleared by the bus reset
// input rst, a choice of this design (the original latches have no clear).
// cntrlsel, which routes the low processor byte onto cd, is qualified here
// by the absence of a read strobe so that a fifo-empty read at the same
// address keeps its per-card nibble routing; this qualification is also
// this design's choice.
module kims_gen_regs
  import kims_pkg::*;
(
  input  logic       clk,
  input  logic       rst,          // RESET DRV of the bus, active high
  input  logic       gen_n,        // general register selected
  input  logic       link_n,       // link register selected
  input  logic       iord_n,
  input  logic       iowr_n,
  input  logic [2:0] a,            // address bits A2..A0
  input  logic [7:0] cd_wr,        // internal bus from the processor
  input  logic [3:0] mx,           // mask bus (this card's mask nibble)
  input  logic [3:0] fe_n,         // per link: low = incoming FIFO empty
  input  logic [3:0] ff_n,         // per link: low = outgoing FIFO full
  output logic       fifo_reset_n, // master reset of the link FIFOs
  output ctrl_t      ctrl,         // control register
  output logic [3:0] mask,         // mask nibble of this card
  output logic       cntrlsel,     // control register addressed (no read)
  output logic       iocs16_n,     // 16-bit I/O register addressed
  output logic [7:0] cd_rd,        // status value on the internal bus
  output logic       stat_oe       // a status register is being read
);

  logic cntrlw, maskw, stat1rd, stat2rd;

  always_comb begin
    cntrlw       = ~gen_n & ~iowr_n & (a == OFS_CTRL);
    maskw        = ~gen_n & ~iowr_n & (a == OFS_MASK);
    stat1rd      = ~gen_n & ~iord_n & (a == OFS_FEMPTY);
    stat2rd      = ~gen_n & ~iord_n & (a == OFS_FFULL);
    fifo_reset_n = ~(rst | (~gen_n & ~iowr_n & (a == OFS_RESET)));
    iocs16_n     = ~(~gen_n | ~link_n);
    cntrlsel     = ~gen_n & (a == OFS_CTRL) & iord_n;
    stat_oe      = stat1rd | stat2rd;
    cd_rd        = stat1rd ? {fe_n, fe_n} : stat2rd ? {ff_n, ff_n} : 8'h00;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl <= '0;
      mask <= '0;
    end else begin
      if (cntrlw) ctrl <= ctrl_t'(cd_wr[3:0]);
      if (maskw)  mask <= mx;
    end
  end

endmodule
