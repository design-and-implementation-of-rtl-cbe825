// kims_link_if: the four bidirectional links of one KIMS card.
//
// Each link has an outgoing FIFO on this card. A write to the link register
// writes cd into the FIFO of every link whose mask bit is set (multicast).
// The FIFO head, its empty flag and the read request for the remote FIFO go
// out on the link cable; from the cable come the remote FIFO head, the
// remote empty flag and the remote CE's read request into the local FIFO.
// A read of the link register sends a read request to the remote FIFO of
// the selected link and places the incoming data on cd, but only when the
// card has not found more than one link selected (tmpillrd_n high). These
// are the card's EPLD4 equations.
//
// fe_n reports, per link, whether the incoming (remote) FIFO is empty and
// ff_n whether the outgoing (local) FIFO is full; both are active low.
// Strobes are combinational; FIFOs change state at the clock edge ending the
// bus cycle, so a link read takes one bus cycle and its data is valid during
// that cycle.
module kims_link_if
  import kims_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic       clk,
  input  logic       fifo_reset_n,
  input  logic       link_n,        // link register selected
  input  logic       iord_n,
  input  logic       iowr_n,
  input  logic       tmpillrd_n,    // low: more than one link selected
  input  logic [3:0] mask,          // mask nibble of this card
  input  logic [7:0] cd_wr,         // internal bus from the processor
  input  link_wire_t link_in  [LINKS_PER_CARD],  // from the remote CEs
  output link_wire_t link_out [LINKS_PER_CARD],  // to the remote CEs
  output logic [3:0] fe_n,          // incoming FIFO empty, per link
  output logic [3:0] ff_n,          // outgoing FIFO full, per link
  output logic [7:0] cd_rd,         // incoming data placed on cd
  output logic       link_oe        // cd_rd is driven (a link is being read)
);

  logic [3:0] linkrd_n, linkwr_n;

  always_comb begin
    cd_rd = '0;
    for (int i = 0; i < LINKS_PER_CARD; i++) begin
      linkrd_n[i] = ~(~link_n & mask[i] & ~iord_n & tmpillrd_n);
      linkwr_n[i] = ~(~link_n & mask[i] & ~iowr_n);
      if (!linkrd_n[i]) cd_rd = cd_rd | link_in[i].data;
      fe_n[i] = link_in[i].empty_n;
    end
    link_oe = ~&linkrd_n;
  end

  for (genvar i = 0; i < LINKS_PER_CARD; i++) begin : g_link
    logic [7:0] q;
    logic       empty_n, full_n;

    kims_link_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk     (clk),
      .mr_n    (fifo_reset_n),
      .w_n     (linkwr_n[i]),
      .d       (cd_wr),
      .r_n     (link_in[i].rd_n),
      .q       (q),
      .empty_n (empty_n),
      .full_n  (full_n)
    );

    assign link_out[i].data    = q;
    assign link_out[i].empty_n = empty_n;
    assign link_out[i].rd_n    = linkrd_n[i];
    assign ff_n[i]             = full_n;
  end

  // At most one incoming link is gated onto cd at a time.
  assert property (@(posedge clk) $onehot0(~linkrd_n));

endmodule
