// tb_kims_gen_regs: checks the general register strobes and contents.
//
// Writes the control and mask registers through their addresses, checks
// that writes to other addresses or without gen_n leave them alone, checks
// the reset pulse of the reset register, and reads the two status registers
// with random link flags.
module tb_kims_gen_regs;
  import kims_pkg::*;

  logic clk = 0, rst;
  logic gen_n, link_n, iord_n, iowr_n;
  logic [2:0] a;
  logic [7:0] cd_wr;
  logic [3:0] mx, fe_n, ff_n, mask;
  logic fifo_reset_n, cntrlsel, iocs16_n, stat_oe;
  ctrl_t ctrl;
  logic [7:0] cd_rd;
  int checks = 0, failures = 0;

  kims_gen_regs dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic idle();
    gen_n = 1; link_n = 1; iord_n = 1; iowr_n = 1; a = '0; cd_wr = '0; mx = '0;
  endtask

  // One bus write cycle to general register offset off.
  task automatic gwrite(logic [2:0] off, logic [7:0] cd, logic [3:0] m, logic sel = 1'b1);
    @(negedge clk);
    gen_n = !sel; iowr_n = 0; a = off; cd_wr = cd; mx = m;
    #1;
    if (off == OFS_RESET && sel) check("reset pulse", 8'(fifo_reset_n), 8'h0);
    else check("no reset pulse", 8'(fifo_reset_n), 8'h1);
    check("iocs16 on gen", 8'(iocs16_n), 8'(!sel));
    @(negedge clk); idle();
  endtask

  initial begin
    logic [3:0] e_ctrl, e_mask;
    idle(); fe_n = '1; ff_n = '1; rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    check("ctrl after reset", 8'(ctrl), 8'h0);
    check("mask after reset", 8'(mask), 8'h0);
    e_ctrl = 0; e_mask = 0;
    for (int t = 0; t < 400; t++) begin
      logic [2:0] off; logic [7:0] cd; logic [3:0] m; logic sel;
      off = 3'($urandom); cd = 8'($urandom); m = 4'($urandom); sel = ($urandom_range(0, 7) != 0);
      gwrite(off, cd, m, sel);
      if (sel && off == 3'd2) e_ctrl = cd[3:0];
      if (sel && off == 3'd0) e_mask = m;
      check("ctrl", 8'(ctrl), 8'(e_ctrl));
      check("mask", 8'(mask), 8'(e_mask));
      // status reads
      fe_n = 4'($urandom); ff_n = 4'($urandom);
      @(negedge clk); gen_n = 0; iord_n = 0; a = 3'd2; #1;
      check("fifo-empty", cd_rd, {fe_n, fe_n}); check("stat_oe", 8'(stat_oe), 8'h1);
      check("cntrlsel off during read", 8'(cntrlsel), 8'h0);
      a = 3'd4; #1;
      check("fifo-full", cd_rd, {ff_n, ff_n});
      a = 3'd6; gen_n = 1; link_n = 0; #1;
      check("no status on link read", 8'(stat_oe), 8'h0);
      check("iocs16 on link", 8'(iocs16_n), 8'h0);
      @(negedge clk); idle();
      a = 3'd2; gen_n = 0; #1;
      check("cntrlsel", 8'(cntrlsel), 8'h1);
      idle();
    end
    // Bus reset also pulses the FIFO reset.
    @(negedge clk); rst = 1; #1; check("rst -> fifo reset", 8'(fifo_reset_n), 8'h0);
    @(negedge clk); rst = 0;
    check("ctrl cleared", 8'(ctrl), 8'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
