// kims_card: one KIMS communication card with four bidirectional links.
//
// Wires the card's five functional blocks: address decoder, data bus
// interface, general registers, link interface, and the DMA/interrupt
// control. The card number comes from two switches (sw); card i holds links
// 4i..4i+3 and nibble i of the 16-bit mask, fifo-empty and fifo-full
// registers. Up to four identical cards share the processor bus of a CE.
//
// Interface: the ISA-style I/O bus of the CE (address, AEN, DACK3, IORD,
// IOWR, 16-bit data split into an input and a per-nibble driven output),
// the inter-card lines (prev in, next_n out, the local open-collector
// levels out and the global ILLRD/ILLWR/DAV levels in), DMA request and
// interrupt outputs (used from card 0), and four link cables.
// Timing: one clock per bus cycle; registers and FIFOs change at the clock
// edge ending the cycle, read data is valid within the cycle.
module kims_card
  import kims_pkg::*;
#(
  parameter logic [15:0] BASE  = KIMS_BASE,
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic        clk,
  input  logic        rst,          // RESET DRV, active high
  input  logic [1:0]  sw,           // card number
  // processor I/O bus
  input  logic [15:0] addr,
  input  logic        aen,
  input  logic        dack_n,
  input  logic        iord_n,
  input  logic        iowr_n,
  input  logic [15:0] cpu_d_in,
  output logic [15:0] cpu_d_out,
  output logic [3:0]  cpu_d_oe,
  output logic        iocs16_n,
  // inter-card communication
  input  logic        prev,
  output logic        next_n,
  output logic        locillrd_n,
  output logic        locillwr_n,
  output logic        newdata_n,
  input  logic        illrd,
  input  logic        illwr,
  input  logic        dav,
  // DMA and interrupts
  output logic        drq,
  output logic        warn_irq,
  output logic        dav_irq,
  // links
  input  link_wire_t  link_in  [LINKS_PER_CARD],
  output link_wire_t  link_out [LINKS_PER_CARD]
);

  logic       gen_n, link_n;
  logic [3:0] sg_n;
  logic [7:0] cd_wr, cd_rd, cd_rd_stat, cd_rd_link;
  logic [3:0] mx, mask, fe_n, ff_n;
  logic       stat_oe, link_oe, cntrlsel, fifo_reset_n;
  logic       maskor, tmpillrd_n;
  ctrl_t      ctrl;

  kims_addr_decode #(.BASE(BASE)) u_dec (
    .addr, .aen, .dack_n, .gen_n, .link_n
  );

  kims_data_bus_if u_dbi (
    .sw, .gen_n, .link_n, .maskor, .tmpillrd_n, .iord_n, .cntrlsel,
    .cpu_d_in, .cd_rd, .sg_n, .cd_wr, .mx, .cpu_d_out, .cpu_d_oe
  );

  kims_gen_regs u_gen (
    .clk, .rst, .gen_n, .link_n, .iord_n, .iowr_n, .a(addr[2:0]),
    .cd_wr, .mx, .fe_n, .ff_n, .fifo_reset_n, .ctrl, .mask, .cntrlsel,
    .iocs16_n, .cd_rd(cd_rd_stat), .stat_oe
  );

  kims_link_if #(.DEPTH(DEPTH)) u_link (
    .clk, .fifo_reset_n, .link_n, .iord_n, .iowr_n, .tmpillrd_n, .mask,
    .cd_wr, .link_in, .link_out, .fe_n, .ff_n, .cd_rd(cd_rd_link), .link_oe
  );

  kims_dma_int_ctrl u_ctl (
    .clk, .rst, .mask, .fe_n, .ff_n, .prev, .illrd, .illwr, .dav,
    .link_n, .gen_n, .iord_n, .iowr_n, .ctrl, .maskor, .tmpillrd_n,
    .locillrd_n, .locillwr_n, .newdata_n, .next_n, .drq, .warn_irq, .dav_irq
  );

  // Internal bus during reads: status buffers or the incoming link data.
  always_comb cd_rd = (stat_oe ? cd_rd_stat : 8'h00) | (link_oe ? cd_rd_link : 8'h00);

  // Never two sources on the internal bus at once.
  assert property (@(posedge clk) !(stat_oe && link_oe));

endmodule
