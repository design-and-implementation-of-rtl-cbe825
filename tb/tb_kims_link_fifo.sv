// tb_kims_link_fifo: checks the 2048-byte link FIFO against a queue model.
//
// Random writes and reads (including simultaneous ones), a complete fill to
// the full flag with an ignored extra write, a complete drain with an
// ignored extra read, and a master reset. Data, flags and fill level are
// compared every cycle with a SystemVerilog queue.
module tb_kims_link_fifo;
  localparam int DEPTH = 2048;
  logic clk = 0, mr_n, w_n, r_n, empty_n, full_n;
  logic [7:0] d, q;
  logic [7:0] model[$];
  int checks = 0, failures = 0;

  kims_link_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d (level %0d)", what, got, exp, model.size());
    end
  endtask

  // One cycle with the given strobes; checks flags and head before the edge.

  task automatic step(bit wr, bit rd, logic [7:0] data);
    @(negedge clk);
    w_n = !wr; r_n = !rd; d = data;
    #1;
    check("empty_n", empty_n, model.size() != 0);
    check("full_n", full_n, model.size() != DEPTH);
    if (model.size() != 0) check("q", q, model[0]);
    begin
      bit can_wr, can_rd;
      can_wr = wr && model.size() != DEPTH;
      can_rd = rd && model.size() != 0;
      @(posedge clk);
      if (can_rd) void'(model.pop_front());
      if (can_wr) model.push_back(data);
    end
  endtask

  initial begin
    w_n = 1; r_n = 1; d = 0; mr_n = 0;
    repeat (2) @(negedge clk);
    mr_n = 1;
    for (int t = 0; t < 3000; t++) step($urandom_range(0, 1), $urandom_range(0, 2) == 0, 8'($urandom));
    while (model.size() < DEPTH) step(1, 0, 8'($urandom));
    step(1, 0, 8'hAA);              // ignored: full
    check("full level", model.size(), DEPTH);
    step(1, 1, 8'h55);              // read and write while full
    while (model.size() > 0) step(0, 1, 8'h00);
    step(0, 1, 8'h00);              // ignored: empty
    step(1, 1, 8'h3C);              // read while empty is ignored, write lands
    for (int t = 0; t < 100; t++) step(1, 0, 8'(t));
    @(negedge clk); mr_n = 0; w_n = 1; r_n = 1;
    @(negedge clk); mr_n = 1; model.delete();
    step(0, 0, 8'h00);
    check("empty after reset", empty_n, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
