// kims_addr_decode: I/O address decoder of a KIMS communication card.
//
// Purely combinational. gen_n goes low for a processor I/O cycle (AEN low)
// addressing BASE..BASE+5, the general registers. link_n goes low for a
// processor I/O cycle addressing BASE+6/BASE+7, the link register, and also
// during a DMA cycle on channel 3 (AEN high with DACK3 low), since the link
// register is the DMA port of the card. As on the original card, address bit
// A0 is not decoded here, A4 and A3 must be zero, and A15..A5 must match the
// base. The BASE parameter (default 140h) replaces the hard-wired base of the
// original decoder; it must have its low five bits zero.
module kims_addr_decode
  import kims_pkg::*;
#(
  parameter logic [15:0] BASE = KIMS_BASE
) (
  input  logic [15:0] addr,    // processor I/O address A15..A0
  input  logic        aen,     // high while the DMA controller owns the bus
  input  logic        dack_n,  // DMA channel 3 acknowledge, active low
  output logic        gen_n,   // general register selected, active low
  output logic        link_n   // link register selected, active low
);

  logic hi_match;   // A15..A5 equal to the base
  logic a3a4_zero;  // NOR of A3 and A4
  logic link_addr;
  logic gen_addr;
  logic dma_active;

  always_comb begin
    hi_match   = (addr[15:5] == BASE[15:5]);
    a3a4_zero  = ~(addr[3] | addr[4]);
    link_addr  = ~aen & hi_match & a3a4_zero & (addr[2:1] == 2'b11);
    gen_addr   = ~aen & hi_match & a3a4_zero & (addr[2:1] != 2'b11);
    dma_active = aen & ~dack_n;
    link_n     = ~(link_addr | dma_active);
    gen_n      = ~gen_addr;
  end

endmodule
