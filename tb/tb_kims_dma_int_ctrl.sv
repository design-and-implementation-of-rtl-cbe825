// tb_kims_dma_int_ctrl: checks the illegal-access, chain, DMA request and
// interrupt logic of one card.
//
// Random masks, link flags and global levels are compared with a reference
// that counts selected links and looks up their flags. The WARN flag is
// checked through a sequence: an illegal link access sets it, it stays set
// across other cycles, and a general register access clears it.
module tb_kims_dma_int_ctrl;
  import kims_pkg::*;

  logic clk = 0, rst;
  logic [3:0] mask, fe_n, ff_n;
  logic prev, illrd, illwr, dav, link_n, gen_n, iord_n, iowr_n;
  ctrl_t ctrl;
  logic maskor, tmpillrd_n, locillrd_n, locillwr_n, newdata_n, next_n, drq, warn_irq, dav_irq;
  int checks = 0, failures = 0;

  kims_dma_int_ctrl dut (.*);
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
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d mask=%b fe_n=%b ff_n=%b prev=%b", what, got, exp, mask, fe_n, ff_n, prev);
    end
  endtask

  initial begin
    rst = 1; link_n = 1; gen_n = 1; iord_n = 1; iowr_n = 1; ctrl = '0;
    mask = 0; fe_n = '1; ff_n = '1; prev = 0; illrd = 0; illwr = 0; dav = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 5000; t++) begin
      int nsel; bit any_empty, any_full, any_data, multi;
      @(negedge clk);
      mask = 4'($urandom); fe_n = 4'($urandom); ff_n = 4'($urandom); prev = 1'($urandom);
      illrd = 1'($urandom); illwr = 1'($urandom); dav = 1'($urandom); ctrl = ctrl_t'($urandom);
      #1;
      nsel = $countones(mask);
      any_empty = 0; any_full = 0; any_data = 0;
      for (int i = 0; i < 4; i++) if (mask[i]) begin
        if (!fe_n[i]) any_empty = 1;
        if (!ff_n[i]) any_full = 1;
        if (fe_n[i])  any_data = 1;
      end
      multi = (nsel > 1) || (prev && nsel > 0);
      check("maskor", maskor, nsel > 0);
      check("tmpillrd_n", tmpillrd_n, !multi);
      check("locillrd_n", locillrd_n, !(multi || any_empty));
      check("locillwr_n", locillwr_n, !any_full);
      check("newdata_n", newdata_n, !any_data);
      check("next_n", next_n, !(prev || nsel > 0));
      check("drq", drq, ctrl.dma && (ctrl.dir ? !illrd : !illwr));
      check("dav_irq", dav_irq, ctrl.dav && dav);
    end
    // WARN sequence.
    @(negedge clk); ctrl = '{warn: 1, dav: 0, dma: 0, dir: 0}; illrd = 1; illwr = 0;
    gen_n = 1; link_n = 1; iord_n = 1; iowr_n = 1;
    @(negedge clk); gen_n = 0; @(negedge clk); gen_n = 1;   // clear whatever the random phase left
    check("warn clear", warn_irq, 0);
    link_n = 0; iowr_n = 0;                                 // legal write: no warn
    @(negedge clk); link_n = 1; iowr_n = 1;
    check("warn after legal write", warn_irq, 0);
    link_n = 0; iord_n = 0;                                 // illegal read
    @(negedge clk); link_n = 1; iord_n = 1;
    check("warn after illegal read", warn_irq, 1);
    repeat (3) @(negedge clk);
    check("warn held", warn_irq, 1);
    ctrl.warn = 0; #1; check("warn masked", warn_irq, 0); ctrl.warn = 1; #1;
    gen_n = 0; @(negedge clk); gen_n = 1;                   // general register access
    check("warn cleared by gen access", warn_irq, 0);
    illrd = 0; illwr = 1; link_n = 0; iowr_n = 0;           // illegal write
    @(negedge clk); link_n = 1; iowr_n = 1;
    check("warn after illegal write", warn_irq, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
