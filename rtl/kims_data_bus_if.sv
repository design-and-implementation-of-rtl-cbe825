// kims_data_bus_if: processor data bus interface of one KIMS card.
//
// The processor bus is 16 bits wide and the card's internal bus cd is 8 bits.
// Four nibble transceivers DBF0..DBF3 connect processor nibble i to an
// internal nibble: DBF0 and DBF2 to cd[3:0], DBF1 and DBF3 to cd[7:4]. Their
// enables sg_n[3:0] follow the card's EPLD2 equations:
//   * link register write, control register access, and a legal link read
//     (this card holds the one selected link): DBF0 and DBF1, i.e. the low
//     byte of the processor bus;
//   * any other general register access: only DBF<card>, so card i reads or
//     writes nibble i of the 16-bit mask / fifo-empty / fifo-full registers.
// The transceiver direction is set by IORD: towards the processor during a
// read, towards the card otherwise. A nibble multiplexer (74LS157 on the
// original card) driven by switch SW0 then picks from cd the 4-bit mask bus
// mx: cd[3:0] on cards 0 and 2, cd[7:4] on cards 1 and 3.
//
// Modelling choices of this design: tri-state buses are split into
// directed signals. cd_wr is what the transceivers place on cd during a
// write; cd_rd is what the card's own sources place on cd during a read;
// cpu_d_out with per-nibble enables cpu_d_oe is what the card drives onto the
// processor bus. Purely combinational.
module kims_data_bus_if (
  input  logic [1:0]  sw,          // card number switches SW1..SW0
  input  logic        gen_n,       // general register selected
  input  logic        link_n,      // link register selected
  input  logic        maskor,      // some link on this card is selected
  input  logic        tmpillrd_n,  // low: more than one link selected
  input  logic        iord_n,      // I/O read strobe
  input  logic        cntrlsel,    // control register address selected
  input  logic [15:0] cpu_d_in,    // processor data bus, write data
  input  logic [7:0]  cd_rd,       // internal bus value driven by the card's sources
  output logic [3:0]  sg_n,        // transceiver enables, active low
  output logic [7:0]  cd_wr,       // internal bus value driven from the processor
  output logic [3:0]  mx,          // 4-bit mask bus
  output logic [15:0] cpu_d_out,   // data the card drives onto the processor bus
  output logic [3:0]  cpu_d_oe     // per-nibble drive enables of cpu_d_out
);

  logic legalrd, legalwr, validlink;
  logic [3:0] sg;

  always_comb begin
    legalrd   = tmpillrd_n & ~iord_n & maskor & ~link_n;
    legalwr   = iord_n & ~link_n;
    validlink = legalrd | legalwr;

    sg[0] = validlink | cntrlsel | (sw == 2'd0 && !gen_n);
    sg[1] = validlink | cntrlsel | (sw == 2'd1 && !gen_n);
    sg[2] = (sw == 2'd2) & ~gen_n & ~cntrlsel;
    sg[3] = (sw == 2'd3) & ~gen_n & ~cntrlsel;
    sg_n  = ~sg;

    // Towards the card (no read in progress).
    cd_wr = '0;
    if (iord_n) begin
      if (sg[0]) cd_wr[3:0] = cpu_d_in[3:0];
      if (sg[2]) cd_wr[3:0] = cpu_d_in[11:8];
      if (sg[1]) cd_wr[7:4] = cpu_d_in[7:4];
      if (sg[3]) cd_wr[7:4] = cpu_d_in[15:12];
    end
    mx = sw[0] ? cd_wr[7:4] : cd_wr[3:0];

    // Towards the processor (read in progress).
    cpu_d_out = {cd_rd[7:4], cd_rd[3:0], cd_rd[7:4], cd_rd[3:0]};
    cpu_d_oe  = iord_n ? 4'b0000 : sg;
  end

endmodule
