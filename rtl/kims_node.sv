// kims_node: the link interface of one KIMS computing element (CE).
//
// Up to four identical cards (NUM_CARDS, default 4, giving 16 links) sit on
// the CE's I/O bus. Card i is strapped to number i. The cards are chained
// through prev/next_n so that each knows whether a link is selected on a
// lower card, and they share three open-collector lines: ILLRD (some card
// finds a read illegal), ILLWR (some card finds a write illegal) and DAV
// (some selected link has data). Each line is the AND of the cards' active-
// low outputs; every card receives its inverted level. Card 0 drives the
// CE's DMA request (DRQ3) and interrupt lines (IRQ10 = WARN, IRQ11 = DAV).
// The processor data bus is the OR of the nibbles the cards drive during a
// read; d_oe tells which nibbles are driven.
//
// Timing: one clock per bus cycle, as in kims_card. link i of the CE is
// link i%4 of card i/4; its cable is link_out[i]/link_in[i].
module kims_node
  import kims_pkg::*;
#(
  parameter int unsigned NUM_CARDS = MAX_CARDS,
  parameter logic [15:0] BASE      = KIMS_BASE,
  parameter int unsigned DEPTH     = FIFO_DEPTH
) (
  input  logic        clk,
  input  logic        rst,        // RESET DRV, active high
  input  logic [15:0] addr,
  input  logic        aen,
  input  logic        dack3_n,
  input  logic        iord_n,
  input  logic        iowr_n,
  input  logic [15:0] d_in,       // data from the processor or DMA controller
  output logic [15:0] d_out,      // data driven by the cards
  output logic [3:0]  d_oe,       // nibbles of d_out driven
  output logic        iocs16_n,
  output logic        drq3,
  output logic        irq10,      // WARN interrupt
  output logic        irq11,      // DAV interrupt
  input  link_wire_t  link_in  [NUM_CARDS*LINKS_PER_CARD],
  output link_wire_t  link_out [NUM_CARDS*LINKS_PER_CARD]
);

  logic [15:0] c_d_out   [NUM_CARDS];
  logic [3:0]  c_d_oe    [NUM_CARDS];
  logic [NUM_CARDS-1:0] c_iocs16_n, c_next_n, c_locillrd_n, c_locillwr_n, c_newdata_n;
  logic [NUM_CARDS-1:0] c_drq, c_warn, c_dav;
  logic illrd, illwr, dav;

  for (genvar c = 0; c < NUM_CARDS; c++) begin : g_card
    link_wire_t lin  [LINKS_PER_CARD];
    link_wire_t lout [LINKS_PER_CARD];
    logic prev;

    // Card 0 has its PREV input tied inactive.
    if (c == 0) begin : g_first
      assign prev = 1'b0;
    end else begin : g_chain
      assign prev = ~c_next_n[c-1];
    end

    for (genvar l = 0; l < LINKS_PER_CARD; l++) begin : g_l
      assign lin[l] = link_in[c*LINKS_PER_CARD + l];
      assign link_out[c*LINKS_PER_CARD + l] = lout[l];
    end

    kims_card #(.BASE(BASE), .DEPTH(DEPTH)) u_card (
      .clk, .rst, .sw(2'(c)), .addr, .aen, .dack_n(dack3_n), .iord_n, .iowr_n,
      .cpu_d_in(d_in), .cpu_d_out(c_d_out[c]), .cpu_d_oe(c_d_oe[c]),
      .iocs16_n(c_iocs16_n[c]), .prev, .next_n(c_next_n[c]),
      .locillrd_n(c_locillrd_n[c]), .locillwr_n(c_locillwr_n[c]),
      .newdata_n(c_newdata_n[c]), .illrd, .illwr, .dav,
      .drq(c_drq[c]), .warn_irq(c_warn[c]), .dav_irq(c_dav[c]),
      .link_in(lin), .link_out(lout)
    );
  end

  // Wired-AND shared lines, seen inverted (active high) by every card.
  always_comb begin
    illrd = ~&c_locillrd_n;
    illwr = ~&c_locillwr_n;
    dav   = ~&c_newdata_n;
    iocs16_n = &c_iocs16_n;
    drq3  = c_drq[0];
    irq10 = c_warn[0];
    irq11 = c_dav[0];
    d_out = '0;
    d_oe  = '0;
    for (int c = 0; c < NUM_CARDS; c++) begin
      for (int n = 0; n < 4; n++) begin
        if (c_d_oe[c][n]) d_out[n*4 +: 4] = d_out[n*4 +: 4] | c_d_out[c][n*4 +: 4];
      end
      d_oe = d_oe | c_d_oe[c];
    end
  end

  // No two cards drive the same nibble of the processor bus.
  for (genvar n = 0; n < 4; n++) begin : g_contention
    logic [NUM_CARDS-1:0] drivers;
    for (genvar c = 0; c < NUM_CARDS; c++) begin : g_c
      assign drivers[c] = c_d_oe[c][n];
    end
    assert property (@(posedge clk) $onehot0(drivers));
  end

endmodule
