// tb_kims_node: one CE with four cards (16 links) seen from its I/O bus.
//
// The testbench is the host processor, the DMA controller and the remote
// end of all 16 link cables. Checks: the 16-bit mask, fifo-empty and
// fifo-full registers are assembled from the four cards' nibbles; a read of
// a single selected link on any card; a read with two links selected on one
// card or on two cards (only the lowest selected card may transfer, and
// ILLRD raises WARN on IRQ10 until a general register access); multicast
// DMA writes to links on different cards that stall while any one of them
// is full; and the DAV interrupt on IRQ11.
module tb_kims_node;
  import kims_pkg::*;
  localparam int DEPTH = 4;
  localparam int NL = 16;
  localparam logic [15:0] B = 16'h0140;

  logic clk = 0, rst;
  logic [15:0] addr, d_in, d_out;
  logic aen, dack3_n, iord_n, iowr_n, iocs16_n, drq3, irq10, irq11;
  logic [3:0] d_oe;
  link_wire_t link_in [NL];
  link_wire_t link_out [NL];
  int checks = 0, failures = 0;

  kims_node #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

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
    addr = 16'h0000; aen = 0; dack3_n = 1; iord_n = 1; iowr_n = 1; d_in = '0;
  endtask

  task automatic io_write(logic [15:0] a, logic [15:0] v);
    @(negedge clk); idle(); addr = a; d_in = v; iowr_n = 0;
    @(negedge clk); idle(); #1;
  endtask

  task automatic io_read(logic [15:0] a, output logic [15:0] v, output logic [3:0] oe);
    @(negedge clk); idle(); addr = a; iord_n = 0; #1;
    v = d_out; oe = d_oe;
    @(negedge clk); idle(); #1;
  endtask

  initial begin
    logic [15:0] v, fe; logic [3:0] oe;
    idle(); rst = 1;
    for (int i = 0; i < NL; i++) link_in[i] = '{data: 8'(i), empty_n: 1'b0, rd_n: 1'b1};
    repeat (2) @(negedge clk); rst = 0;

    // Status registers assembled from all cards.
    for (int t = 0; t < 20; t++) begin
      fe = 16'($urandom);
      for (int i = 0; i < NL; i++) link_in[i].empty_n = fe[i];
      io_read(B + 2, v, oe);
      check("fifo-empty 16 bit", v, fe);
      check("fifo-empty all nibbles", oe, 4'hF);
    end
    io_read(B + 4, v, oe);
    check("fifo-full all free", v, 16'hFFFF);

    // Mask register distributed over the cards.
    for (int t = 0; t < 20; t++) begin
      v = 16'($urandom);
      io_write(B + 0, v);
      check("mask card0", dut.g_card[0].u_card.u_gen.mask, v[3:0]);
      check("mask card1", dut.g_card[1].u_card.u_gen.mask, v[7:4]);
      check("mask card2", dut.g_card[2].u_card.u_gen.mask, v[11:8]);
      check("mask card3", dut.g_card[3].u_card.u_gen.mask, v[15:12]);
    end

    // Single-link reads on every link.
    for (int i = 0; i < NL; i++) link_in[i].empty_n = 1;
    for (int i = 0; i < NL; i++) begin
      io_write(B + 0, 16'(1 << i));
      @(negedge clk); addr = B + 6; iord_n = 0; #1;
      check("single read data", d_out[7:0], i);
      check("single read oe", d_oe, 4'b0011);
      for (int k = 0; k < NL; k++) check("read request", link_out[k].rd_n, k != i);
      @(negedge clk); idle(); #1;
    end

    // WARN interrupt enabled; two links on card 2 selected: no transfer.
    io_write(B + 2, 16'h0008);
    io_write(B + 0, 16'h0300);
    check("illrd level before access", irq10, 0);
    @(negedge clk); addr = B + 6; iord_n = 0; #1;
    check("double select same card: no drive", d_oe, 0);
    for (int k = 0; k < NL; k++) check("no read request", link_out[k].rd_n, 1);
    @(negedge clk); idle(); #1;
    check("WARN raised", irq10, 1);
    repeat (3) @(negedge clk);
    check("WARN held", irq10, 1);
    io_read(B + 2, v, oe);
    check("WARN cleared by register access", irq10, 0);

    // Links 1 (card 0) and 9 (card 2): card 0 is first in the chain.
    io_write(B + 0, 16'h0202);
    @(negedge clk); addr = B + 6; iord_n = 0; #1;
    check("cross-card: lowest card reads", link_out[1].rd_n, 0);
    check("cross-card: higher card blocked", link_out[9].rd_n, 1);
    @(negedge clk); idle(); #1;
    check("cross-card double select raises WARN", irq10, 1);
    io_write(B + 2, 16'h0000);

    // Multicast DMA write to links 2 (card 0) and 13 (card 3).
    io_write(B + 4, 16'h0000);  // reset all FIFOs
    io_write(B + 0, 16'h2004);
    io_write(B + 2, 16'h0002);  // DMA, DIR = write
    begin
      int n = 0, stalls = 0;
      for (int cyc = 0; cyc < 200 && n < 10; cyc++) begin
        if (drq3) begin
          @(negedge clk); aen = 1; dack3_n = 0; iowr_n = 0; d_in = 16'(8'h40 + n);
          @(negedge clk); idle(); #1; n++;
          if (n == DEPTH) check("stall at full", drq3, 0);
        end else begin
          stalls++;
          // The two remote CEs drain their links at different rates.
          @(negedge clk); link_in[13].rd_n = !(stalls % 2 == 0);
          link_in[2].rd_n = !(stalls % 3 == 0);
          @(negedge clk); link_in[13].rd_n = 1; link_in[2].rd_n = 1; #1;
        end
      end
      check("bytes sent", n, 10);
      check("stalled", stalls > 0, 1);
    end
    io_write(B + 2, 16'h0000);

    // DAV interrupt on any selected link with data.
    for (int i = 0; i < NL; i++) link_in[i].empty_n = 0;
    io_write(B + 0, 16'h8001);
    io_write(B + 2, 16'h0004);
    check("no DAV", irq11, 0);
    link_in[15].empty_n = 1; #1;
    check("DAV from card 3", irq11, 1);
    link_in[14].empty_n = 1; link_in[15].empty_n = 0; #1;
    check("DAV ignores unselected link", irq11, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
