// tb_kims_card: exercises one card (strapped as card 1) through its I/O bus.
//
// The testbench plays the host processor, the DMA controller, the other
// cards (prev input, wired-AND lines closed over this card alone) and the
// remote CEs on the four link cables. It checks the nibble placement of the
// mask and status registers for card 1, control writes, multicast link
// writes, single-link reads, read suppression when a lower card already has
// a link selected, DMA requests that stop when a FIFO fills and resume when
// the remote side drains it, DACK3 writes, and the reset register.
module tb_kims_card;
  import kims_pkg::*;
  localparam int DEPTH = 4;
  localparam logic [15:0] B = 16'h0140;

  logic clk = 0, rst;
  logic [15:0] addr, cpu_d_in, cpu_d_out;
  logic aen, dack_n, iord_n, iowr_n, iocs16_n;
  logic [3:0] cpu_d_oe;
  logic prev, next_n, locillrd_n, locillwr_n, newdata_n, illrd, illwr, dav;
  logic drq, warn_irq, dav_irq;
  link_wire_t link_in [LINKS_PER_CARD];
  link_wire_t link_out [LINKS_PER_CARD];
  int checks = 0, failures = 0;

  kims_card #(.DEPTH(DEPTH)) dut (.sw(2'd1), .*);
  always #5 clk = ~clk;
  assign illrd = !locillrd_n;
  assign illwr = !locillwr_n;
  assign dav   = !newdata_n;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  task automatic idle();
    addr = 16'h0000; aen = 0; dack_n = 1; iord_n = 1; iowr_n = 1; cpu_d_in = '0;
  endtask

  task automatic io_write(logic [15:0] a, logic [15:0] v);
    @(negedge clk); idle(); addr = a; cpu_d_in = v; iowr_n = 0;
    @(negedge clk); idle(); #1;
  endtask

  // Read cycle: returns the nibbles this card drives and the enables.
  task automatic io_read(logic [15:0] a, output logic [15:0] v, output logic [3:0] oe);
    @(negedge clk); idle(); addr = a; iord_n = 0; #1;
    v = cpu_d_out; oe = cpu_d_oe;
    @(negedge clk); idle(); #1;
  endtask

  initial begin
    logic [15:0] v; logic [3:0] oe;
    idle(); prev = 0; rst = 1;
    for (int i = 0; i < 4; i++) begin link_in[i] = '{data: 8'(8'hA0 + i), empty_n: 1'b0, rd_n: 1'b1}; end
    repeat (2) @(negedge clk); rst = 0;

    // Mask nibble 1 selects links 4..7, i.e. this card's links 0..3.
    io_write(B + 0, 16'hF0F0);
    check("mask", dut.u_gen.mask, 4'hF);
    check("maskor -> next_n", next_n, 0);
    // fifo-empty read: card 1 drives nibble 1 only.
    link_in[2].empty_n = 1;
    io_read(B + 2, v, oe);
    check("fifo-empty oe", oe, 4'b0010);
    check("fifo-empty value", v[7:4], 4'b0100);
    io_read(B + 4, v, oe);
    check("fifo-full oe", oe, 4'b0010);
    check("fifo-full value", v[7:4], 4'hF);
    check("iocs16", iocs16_n, 1);

    // Control register from the low byte.
    io_write(B + 2, 16'h00F5);
    check("ctrl", dut.u_gen.ctrl, 4'h5);
    io_write(B + 2, 16'h0000);

    // Multicast to links 1 and 3 of this card (mask bits 5 and 7).
    io_write(B + 0, 16'h00A0);
    io_write(B + 6, 16'h005A);
    check("tx link1", link_out[1].data, 8'h5A); check("tx link1 flag", link_out[1].empty_n, 1);
    check("tx link3", link_out[3].data, 8'h5A); check("tx link3 flag", link_out[3].empty_n, 1);
    check("link0 untouched", link_out[0].empty_n, 0);
    check("link2 untouched", link_out[2].empty_n, 0);

    // Single link read from link 2.
    io_write(B + 0, 16'h0040);
    @(negedge clk); addr = B + 6; iord_n = 0; #1;
    check("read request", link_out[2].rd_n, 0);
    check("read data", cpu_d_out[7:0], 8'hA2);
    check("read oe", cpu_d_oe, 4'b0011);
    check("no warn on legal read", illrd, 0);
    // A lower card already has a link selected: no transfer.
    prev = 1; #1;
    check("suppressed request", link_out[2].rd_n, 1);
    check("suppressed oe", cpu_d_oe, 4'b0000);
    check("illrd on double select", illrd, 1);
    @(negedge clk); idle(); prev = 0;
    // Illegal read of an empty link is flagged.
    io_write(B + 0, 16'h0010);
    check("illrd on empty link", illrd, 1);

    // DMA write to link 0 (DIR = 0, DMA = 1): DRQ until the FIFO fills.
    io_write(B + 0, 16'h0010);
    io_write(B + 2, 16'h0002);
    begin
      int n = 0;
      while (drq && n < 10) begin
        @(negedge clk); aen = 1; dack_n = 0; iowr_n = 0; cpu_d_in = 16'(n);
        @(negedge clk); idle(); n++;
      end
      check("DMA writes until full", n, DEPTH);
    end
    check("drq dropped when full", drq, 0);
    check("illwr when full", illwr, 1);
    // Remote drains one byte: DRQ comes back.
    @(negedge clk); link_in[0].rd_n = 0; #1; check("remote sees head", link_out[0].data, 0);
    @(negedge clk); link_in[0].rd_n = 1; #1;
    check("drq resumes", drq, 1);
    check("remote sees next", link_out[0].data, 1);

    // DMA read direction with data on link 0.
    io_write(B + 2, 16'h0003);
    link_in[0].empty_n = 1; #1; check("drq read", drq, 1);
    link_in[0].empty_n = 0; #1; check("drq read stops on empty", drq, 0);

    // DAV interrupt enable.
    io_write(B + 2, 16'h0004);
    link_in[0].empty_n = 1; #1; check("dav irq", dav_irq, 1);
    link_in[0].empty_n = 0; #1; check("dav irq off", dav_irq, 0);

    // Reset register empties the outgoing FIFOs.
    io_write(B + 4, 16'h0000);
    for (int i = 0; i < 4; i++) check("reset empties", link_out[i].empty_n, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
