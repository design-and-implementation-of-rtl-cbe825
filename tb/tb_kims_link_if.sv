// tb_kims_link_if: checks the four links of a card from the cable side.
//
// The testbench plays the remote CEs: it presents incoming data and empty
// flags and issues read requests into the card's FIFOs. Checks: multicast
// writes land only in the masked links, the cable carries the FIFO head and
// flags, a link register read requests a read from exactly the selected
// remote FIFO and returns its data, reads are suppressed when tmpillrd_n is
// low, and the fifo-empty/full flags follow the cable and the FIFOs.
module tb_kims_link_if;
  import kims_pkg::*;
  localparam int DEPTH = 8;

  logic clk = 0, fifo_reset_n, link_n, iord_n, iowr_n, tmpillrd_n;
  logic [3:0] mask, fe_n, ff_n;
  logic [7:0] cd_wr, cd_rd;
  logic link_oe;
  link_wire_t link_in [LINKS_PER_CARD];
  link_wire_t link_out [LINKS_PER_CARD];
  logic [7:0] model [4][$];
  int checks = 0, failures = 0;

  kims_link_if #(.DEPTH(DEPTH)) dut (.*);
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
      if (failures < 20) $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  task automatic idle();
    link_n = 1; iord_n = 1; iowr_n = 1; cd_wr = '0;
    for (int i = 0; i < 4; i++) link_in[i].rd_n = 1;
  endtask

  task automatic check_cable();
    for (int i = 0; i < 4; i++) begin
      check("tx empty_n", link_out[i].empty_n, model[i].size() != 0);
      check("ff_n", ff_n[i], model[i].size() != DEPTH);
      if (model[i].size() != 0) check("tx data", link_out[i].data, model[i][0]);
      check("fe_n follows cable", fe_n[i], link_in[i].empty_n);
    end
  endtask

  initial begin
    idle(); tmpillrd_n = 1; mask = 0;
    for (int i = 0; i < 4; i++) begin link_in[i].data = 8'(8'h10 * i + 1); link_in[i].empty_n = 1; end
    fifo_reset_n = 0;
    repeat (2) @(negedge clk);
    fifo_reset_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      idle();
      mask = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        link_in[i].data = 8'($urandom); link_in[i].empty_n = 1'($urandom);
      end
      #1; check_cable();
      case ($urandom_range(0, 2))
        0: begin // multicast link register write
          logic [7:0] v; v = 8'($urandom);
          link_n = 0; iowr_n = 0; cd_wr = v; #1;
          for (int i = 0; i < 4; i++) check("no read request on write", link_out[i].rd_n, 1);
          @(posedge clk);
          for (int i = 0; i < 4; i++) if (mask[i] && model[i].size() < DEPTH) model[i].push_back(v);
        end
        1: begin // link register read
          // The card never reports a single selection when several links are set.
          tmpillrd_n = ($countones(mask) <= 1) && ($urandom_range(0, 3) != 0);
          link_n = 0; iord_n = 0; #1;
          for (int i = 0; i < 4; i++) begin
            bit exp_rd;
            exp_rd = mask[i] && tmpillrd_n;
            check("read request", link_out[i].rd_n, !exp_rd);
            if (exp_rd && $countones(mask) == 1) check("read data", cd_rd, link_in[i].data);
          end
          check("link_oe", link_oe, (mask != 0) && tmpillrd_n);
          @(posedge clk);
          tmpillrd_n = 1;
        end
        default: begin // remote reads from our FIFOs
          logic [3:0] r; r = 4'($urandom);
          for (int i = 0; i < 4; i++) link_in[i].rd_n = !r[i];
          @(posedge clk);
          for (int i = 0; i < 4; i++) if (r[i] && model[i].size() != 0) void'(model[i].pop_front());
        end
      endcase
    end
    @(negedge clk); idle(); #1; check_cable();
    // Register reset empties all FIFOs.
    fifo_reset_n = 0; @(negedge clk); fifo_reset_n = 1;
    for (int i = 0; i < 4; i++) model[i].delete();
    #1; check_cable();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
