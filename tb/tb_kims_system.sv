// tb_kims_system: two CEs exchanging data over link 0, end to end, with
// every parameter at its default (four cards and 16 links per CE, 2048-byte
// FIFOs).
//
// The testbench is both hosts and both DMA controllers, plus the far end of
// the external link 5 of CE 0. Each host runs the routines of the message
// passing library at bus level. Phases:
//   1. Polled transfer: CE 1 sends the partial sum 51+..+100 (two bytes),
//      checking fifo-full before each byte; CE 0 polls fifo-empty, reads it
//      and adds its own partial sum 1+..+50; the result must be 5050.
//   2. Multicast: CE 0 writes a block to links 0 and 5 at once; CE 1 and the
//      external link 5 each receive an identical copy.
//   3. Interrupt-driven transfer: CE 1 writes without status checks until
//      WARN (IRQ10) reports the write that found the FIFO full; exactly 2048
//      bytes must have gone in. CE 0 then reads without checks until WARN
//      reports a read of an empty FIFO; it must have read all 2048 bytes.
//   4. DMA transfer of 5000 bytes from CE 1 to CE 0: CE 1's DMA starts first
//      and stalls when the FIFO fills; CE 0's DMA then drains it and stalls
//      whenever the FIFO runs empty; all bytes must arrive in order.
//   5. DAV interrupt (IRQ11) on data arrival, and the reset register.
//   6. A back-to-back DMA burst: one byte per bus cycle with no wait state,
//      DRQ3 dropping after exactly 2048 cycles when the FIFO is full.
// Each mechanism is counted; one that never occurred counts as a failure.
module tb_kims_system;
  import kims_pkg::*;
  localparam int NL = 16;
  localparam logic [15:0] B = 16'h0140;
  localparam int DMA_BYTES = 5000;

  logic        clk = 0;
  logic        rst      [2];
  logic [15:0] addr     [2];
  logic        aen      [2];
  logic        dack3_n  [2];
  logic        iord_n   [2];
  logic        iowr_n   [2];
  logic [15:0] d_in     [2];
  logic [15:0] d_out    [2];
  logic [3:0]  d_oe     [2];
  logic        iocs16_n [2];
  logic        drq3     [2];
  logic        irq10    [2];
  logic        irq11    [2];
  link_wire_t  ext_link_in  [2][NL-1];
  link_wire_t  ext_link_out [2][NL-1];

  int checks = 0, failures = 0;
  int n_polled = 0, n_multicast = 0, n_warn_full = 0, n_warn_empty = 0;
  int n_dma_full_stall = 0, n_dma_empty_stall = 0, n_dav = 0, n_reset = 0;

  kims_system dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  function automatic int b8(int x);
    return x & 8'hFF;
  endfunction

  task automatic idle(int n);
    addr[n] = 16'h0000; aen[n] = 0; dack3_n[n] = 1; iord_n[n] = 1; iowr_n[n] = 1; d_in[n] = '0;
  endtask

  task automatic io_write(int n, logic [15:0] a, logic [15:0] v);
    @(negedge clk); idle(n); addr[n] = a; d_in[n] = v; iowr_n[n] = 0;
    @(negedge clk); idle(n); #1;
  endtask

  task automatic io_read(int n, logic [15:0] a, output logic [15:0] v);
    @(negedge clk); idle(n); addr[n] = a; iord_n[n] = 0; #1;
    v = d_out[n];
    @(negedge clk); idle(n); #1;
  endtask

  // Blocking byte send with polling of the fifo-full register (bit i of the
  // mask selects link i).
  task automatic poll_write(int n, logic [15:0] mask, logic [7:0] b);
    logic [15:0] ff;
    io_write(n, B + 0, mask);
    do io_read(n, B + 4, ff); while ((ff & mask) != mask);
    io_write(n, B + 6, 16'(b));
    n_polled++;
  endtask

  task automatic poll_read(int n, int link, output logic [7:0] b);
    logic [15:0] fe, v;
    io_write(n, B + 0, 16'(1 << link));
    do io_read(n, B + 2, fe); while (!fe[link]);
    io_read(n, B + 6, v);
    b = v[7:0];
    n_polled++;
  endtask

  initial begin
    logic [7:0] lo, hi, b;
    logic [15:0] v;
    int sum0, sum1, cnt;
    logic [7:0] q5 [$];
    for (int n = 0; n < 2; n++) begin
      idle(n); rst[n] = 1;
      for (int l = 0; l < NL - 1; l++) ext_link_in[n][l] = '{data: 8'h00, empty_n: 1'b0, rd_n: 1'b1};
    end
    repeat (3) @(negedge clk);
    rst[0] = 0; rst[1] = 0;

    // 1. Polled exchange of a partial sum.
    sum0 = 0; sum1 = 0;
    for (int i = 1; i <= 50; i++) sum0 += i;
    for (int i = 51; i <= 100; i++) sum1 += i;
    fork
      begin
        poll_write(1, 16'h0001, 8'(sum1));
        poll_write(1, 16'h0001, 8'(sum1 >> 8));
      end
      begin
        poll_read(0, 0, lo);
        poll_read(0, 0, hi);
      end
    join
    check("sum of 1..100", sum0 + int'({hi, lo}), 5050);

    // 2. Multicast of 64 bytes to link 0 (CE 1) and link 5 (external).
    io_write(0, B + 0, 16'h0021);
    for (int i = 0; i < 64; i++) io_write(0, B + 6, 16'(i * 7 + 3));
    begin
      logic [15:0] fe;
      io_read(1, B + 2, fe);
      check("CE1 sees data", fe[0], 1);
    end
    for (int i = 0; i < 64; i++) begin
      check("link5 copy", ext_link_out[0][4].data, b8(i * 7 + 3));
      check("link5 flag", ext_link_out[0][4].empty_n, 1);
      @(negedge clk); ext_link_in[0][4].rd_n = 0;
      @(negedge clk); ext_link_in[0][4].rd_n = 1;
      poll_read(1, 0, b);
      check("CE1 copy", b, b8(i * 7 + 3));
      n_multicast++;
    end
    check("link5 drained", ext_link_out[0][4].empty_n, 0);

    // 3. Interrupt-driven transfer: WARN enabled on both sides.
    io_write(1, B + 2, 16'h0008);
    io_write(0, B + 2, 16'h0008);
    io_write(1, B + 0, 16'h0001);
    cnt = 0;
    while (!irq10[1] && cnt < 3000) begin
      io_write(1, B + 6, 16'(cnt ^ 8'h5A));
      if (!irq10[1]) cnt++;
    end
    check("bytes accepted before WARN", cnt, FIFO_DEPTH);
    if (irq10[1]) n_warn_full++;
    io_read(1, B + 4, v);   // status access clears WARN
    check("WARN cleared", irq10[1], 0);
    check("fifo-full bit", v[0], 0);
    io_write(0, B + 0, 16'h0001);
    cnt = 0;
    while (cnt < 3000) begin
      io_read(0, B + 6, v);
      if (irq10[0]) break;
      check("interrupt-driven data", v[7:0], b8(cnt ^ 8'h5A));
      cnt++;
    end
    check("bytes read before WARN", cnt, FIFO_DEPTH);
    if (irq10[0]) n_warn_empty++;
    io_write(0, B + 2, 16'h0000);
    io_write(1, B + 2, 16'h0000);

    // 4. DMA transfer CE 1 -> CE 0.
    io_write(1, B + 0, 16'h0001);
    io_write(0, B + 0, 16'h0001);
    io_write(1, B + 2, 16'h0002);   // DMA, write direction
    fork
      begin : dma_tx
        int sent = 0;
        while (sent < DMA_BYTES) begin
          @(negedge clk);
          if (drq3[1]) begin
            aen[1] = 1; dack3_n[1] = 0; iowr_n[1] = 0; d_in[1] = 16'(8'(sent * 13 + 1));
            @(negedge clk); idle(1); sent++;
            // The sending host's bus is busy with other work now and then.
            if (sent % 8 == 0) repeat (16) @(negedge clk);
          end else n_dma_full_stall++;
        end
      end
      begin : dma_rx
        int got = 0;
        // Start the receiver only after the sender has filled the FIFO.
        do @(negedge clk); while (drq3[1]);
        repeat (50) @(negedge clk);
        io_write(0, B + 2, 16'h0003);  // DMA, read direction
        while (got < DMA_BYTES) begin
          @(negedge clk);
          if (drq3[0]) begin
            aen[0] = 1; dack3_n[0] = 0; iord_n[0] = 0; #1;
            check("DMA data", d_out[0][7:0], b8(got * 13 + 1));
            @(negedge clk); idle(0); got++;
          end else n_dma_empty_stall++;
        end
      end
    join
    io_write(0, B + 2, 16'h0000);
    io_write(1, B + 2, 16'h0000);
    check("all DMA bytes consumed", dut.g_ce[1].u_node.link_out[0].empty_n, 0);

    // 5. DAV interrupt and reset register.
    io_write(0, B + 2, 16'h0004);
    check("no DAV while empty", irq11[0], 0);
    io_write(1, B + 0, 16'h0001);
    io_write(1, B + 6, 16'h00C3);
    #1;
    if (irq11[0]) n_dav++;
    check("DAV on arrival", irq11[0], 1);
    io_write(1, B + 4, 16'h0000);   // CE 1 resets its links
    if (!irq11[0]) n_reset++;
    check("reset empties FIFO", irq11[0], 0);

    // 6. Back-to-back DMA burst: one byte per bus cycle, no wait states,
    //    until the FIFO is full after exactly FIFO_DEPTH cycles.
    io_write(1, B + 0, 16'h0001);
    io_write(1, B + 2, 16'h0002);
    begin
      int cycles = 0;
      @(negedge clk);
      while (drq3[1] && cycles < 3000) begin
        aen[1] = 1; dack3_n[1] = 0; iowr_n[1] = 0; d_in[1] = 16'(cycles);
        @(negedge clk); #1; cycles++;
      end
      idle(1);
      check("burst cycles until full", cycles, FIFO_DEPTH);
    end
    io_write(1, B + 2, 16'h0000);
    io_write(1, B + 4, 16'h0000);

    check("polled transfers", n_polled > 0, 1);
    check("multicast", n_multicast > 0, 1);
    check("WARN on full", n_warn_full > 0, 1);
    check("WARN on empty", n_warn_empty > 0, 1);
    check("DMA stall on full", n_dma_full_stall > 0, 1);
    check("DMA stall on empty", n_dma_empty_stall > 0, 1);
    check("DAV interrupt", n_dav > 0, 1);
    check("reset register", n_reset > 0, 1);
    $display("polled=%0d multicast=%0d warn_full=%0d warn_empty=%0d dma_full_stall=%0d dma_empty_stall=%0d dav=%0d reset=%0d",
             n_polled, n_multicast, n_warn_full, n_warn_empty, n_dma_full_stall, n_dma_empty_stall, n_dav, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
