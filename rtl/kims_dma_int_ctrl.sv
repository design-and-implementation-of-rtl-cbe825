// kims_dma_int_ctrl: inter-card signalling, DMA request and interrupts of one
// KIMS card (the card's EPLD5 and EPLD6).
//
// Local conditions, from the card's mask nibble and link flags:
//   * tmpillrd_n low when more than one link is selected, counting the
//     cards before this one through prev (some link selected on a lower
//     card). next_n passes "a link is selected on this card or a lower one"
//     to the next card, so only the first card with a selected link may read.
//   * locillrd_n low when a read is illegal here: more than one link
//     selected, or a selected link's incoming FIFO is empty.
//   * locillwr_n low when a write is illegal here: a selected link's outgoing
//     FIFO is full.
//   * newdata_n low when a selected link has data waiting.
// These are open-collector, wired-AND lines across the cards of one CE
// (ILLRD, ILLWR, DAV); the CE combines them and returns the global levels
// illrd, illwr and dav, active high.
//
// From the global levels (used on card 0 only):
//   * drq: DMA request, asserted while the DMA bit is set and the transfer in
//     direction DIR is legal, so it drops by itself when the selected FIFO
//     runs empty (read) or any selected FIFO fills (write) and returns when
//     the condition clears;
//   * warn_irq: set by a link access while the matching illegal condition
//     holds, held until the next general register access, and driven only
//     while the WARN bit is set;
//   * dav_irq: the DAV level, driven only while the DAV bit is set.
// All outputs except warn_irq are combinational; the WARN flag is a flip-flop
// that samples at the clock edge ending the bus cycle. Because the flags are
// sampled before the FIFOs change, the last valid access to a FIFO does not
// raise a false WARN. The enables of the tri-state drq/irq pins are folded
// into the outputs (a disabled line reads as low).
module kims_dma_int_ctrl
  import kims_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] mask,        // mask nibble of this card
  input  logic [3:0] fe_n,        // incoming FIFO empty, per link
  input  logic [3:0] ff_n,        // outgoing FIFO full, per link
  input  logic       prev,        // a link is selected on a lower card
  input  logic       illrd,       // global illegal-read level
  input  logic       illwr,       // global illegal-write level
  input  logic       dav,         // global data-arrived level
  input  logic       link_n,
  input  logic       gen_n,
  input  logic       iord_n,
  input  logic       iowr_n,
  input  ctrl_t      ctrl,
  output logic       maskor,
  output logic       tmpillrd_n,
  output logic       locillrd_n,
  output logic       locillwr_n,
  output logic       newdata_n,
  output logic       next_n,
  output logic       drq,
  output logic       warn_irq,
  output logic       dav_irq
);

  logic multi_sel;      // more than one link on this card selected
  logic enbfifemp;      // a selected incoming FIFO is empty
  logic enbfiffull;     // a selected outgoing FIFO is full
  logic illegal_access; // link access under an illegal condition
  logic warn_q;

  always_comb begin
    maskor     = |mask;
    multi_sel  = (mask[0] & (mask[1] | mask[2] | mask[3]))
               | (mask[1] & (mask[2] | mask[3]))
               | (mask[2] & mask[3]);
    enbfifemp  = |(mask & ~fe_n);
    enbfiffull = |(mask & ~ff_n);
    tmpillrd_n = ~(multi_sel | (prev & maskor));
    locillrd_n = ~(~tmpillrd_n | enbfifemp);
    locillwr_n = ~enbfiffull;
    newdata_n  = ~|(mask & fe_n);
    next_n     = ~(maskor | prev);

    drq = ctrl.dma & ((ctrl.dir & ~illrd) | (~ctrl.dir & ~illwr));
    illegal_access = (illrd & ~iord_n & ~link_n) | (illwr & ~iowr_n & ~link_n);
    warn_irq = ctrl.warn & warn_q;
    dav_irq  = ctrl.dav & dav;
  end

  always_ff @(posedge clk) begin
    if (rst) warn_q <= 1'b0;
    else     warn_q <= illegal_access | (warn_q & gen_n);
  end

endmodule
