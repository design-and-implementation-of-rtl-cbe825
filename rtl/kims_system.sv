// kims_system: a two-CE KIMS multicomputer link fabric.
//
// Two computing elements, each with a full link interface (kims_node: four
// cards, 16 links), are cabled together through link 0 of each, the
// configuration in which the system was built and measured. Data written by
// CE a into link 0 lands in the FIFO on CE a's card and is read by CE b
// through its own link 0, and the other way round. Links 1..15 of both CEs
// are brought out as ports for further CEs or other topologies; the system
// imposes none.
//
// The host computers and their DMA controllers are outside this design:
// each CE's I/O bus is a set of ports indexed by CE number. One clock
// serves both CEs, one clock per bus cycle.
module kims_system
  import kims_pkg::*;
#(
  parameter int unsigned NUM_CARDS = MAX_CARDS,
  parameter int unsigned DEPTH     = FIFO_DEPTH,
  localparam int unsigned NL       = NUM_CARDS*LINKS_PER_CARD
) (
  input  logic        clk,
  input  logic        rst      [2],
  input  logic [15:0] addr     [2],
  input  logic        aen      [2],
  input  logic        dack3_n  [2],
  input  logic        iord_n   [2],
  input  logic        iowr_n   [2],
  input  logic [15:0] d_in     [2],
  output logic [15:0] d_out    [2],
  output logic [3:0]  d_oe     [2],
  output logic        iocs16_n [2],
  output logic        drq3     [2],
  output logic        irq10    [2],
  output logic        irq11    [2],
  // links 1..NL-1 of each CE, index 0 of the second dimension is link 1
  input  link_wire_t  ext_link_in  [2][NL-1],
  output link_wire_t  ext_link_out [2][NL-1]
);

  link_wire_t lin  [2][NL];
  link_wire_t lout [2][NL];

  for (genvar n = 0; n < 2; n++) begin : g_ce
    kims_node #(.NUM_CARDS(NUM_CARDS), .DEPTH(DEPTH)) u_node (
      .clk, .rst(rst[n]), .addr(addr[n]), .aen(aen[n]), .dack3_n(dack3_n[n]),
      .iord_n(iord_n[n]), .iowr_n(iowr_n[n]), .d_in(d_in[n]),
      .d_out(d_out[n]), .d_oe(d_oe[n]), .iocs16_n(iocs16_n[n]),
      .drq3(drq3[n]), .irq10(irq10[n]), .irq11(irq11[n]),
      .link_in(lin[n]), .link_out(lout[n])
    );

    // Link 0 is the cable between the two CEs.
    assign lin[n][0] = lout[1-n][0];
    for (genvar l = 1; l < NL; l++) begin : g_ext
      assign lin[n][l] = ext_link_in[n][l-1];
      assign ext_link_out[n][l-1] = lout[n][l];
    end
  end

endmodule
