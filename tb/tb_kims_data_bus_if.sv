// tb_kims_data_bus_if: checks transceiver enables and nibble routing.
//
// Drives random combinations of card number, selects, strobes and data and
// compares with a reference written from the routing rules: which nibble of
// the processor bus each card exchanges for each register kind, and which
// cd nibble the mask bus takes on each card.
module tb_kims_data_bus_if;
  logic [1:0]  sw;
  logic        gen_n, link_n, maskor, tmpillrd_n, iord_n, cntrlsel;
  logic [15:0] cpu_d_in;
  logic [7:0]  cd_rd;
  logic [3:0]  sg_n, mx, cpu_d_oe;
  logic [7:0]  cd_wr;
  logic [15:0] cpu_d_out;
  int checks = 0, failures = 0;

  kims_data_bus_if dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h sw=%0d gen_n=%b link_n=%b iord_n=%b cntrlsel=%b",
                                  what, got, exp, sw, gen_n, link_n, iord_n, cntrlsel);
    end
  endtask

  initial begin
    logic [3:0] e_sg;
    logic [7:0] e_cd;
    logic [3:0] e_mx;
    for (int t = 0; t < 20000; t++) begin
      sw = 2'($urandom); cpu_d_in = 16'($urandom); cd_rd = 8'($urandom);
      maskor = 1'($urandom); tmpillrd_n = 1'($urandom); iord_n = 1'($urandom);
      case ($urandom_range(0, 3))
        0: begin gen_n = 1; link_n = 0; cntrlsel = 0; end        // link register
        1: begin gen_n = 0; link_n = 1; cntrlsel = 1; end        // control register
        2: begin gen_n = 0; link_n = 1; cntrlsel = 0; end        // mask/status
        default: begin gen_n = 1; link_n = 1; cntrlsel = 0; end  // not addressed
      endcase
      #1;
      // Expected enables.
      e_sg = '0;
      if (!link_n && (iord_n || (maskor && tmpillrd_n))) e_sg = 4'b0011;
      if (cntrlsel) e_sg = 4'b0011;
      if (!gen_n && !cntrlsel) e_sg[sw] = 1'b1;
      check("sg", 16'(sg_n), 16'(4'(~e_sg)));
      // Write routing: card k's own nibble for mask writes, low byte otherwise.
      if (iord_n) begin
        e_cd = '0;
        if (e_sg == 4'b0011) e_cd = cpu_d_in[7:0];
        else if (e_sg != 0) e_cd = (sw[0] ? {cpu_d_in[sw*4 +: 4], 4'h0} : {4'h0, cpu_d_in[sw*4 +: 4]});
        check("cd_wr", 16'(cd_wr), 16'(e_cd));
        if (!gen_n && !cntrlsel) begin
          e_mx = cpu_d_in[sw*4 +: 4];
          check("mx", 16'(mx), 16'(e_mx));
        end
        check("oe_wr", 16'(cpu_d_oe), 16'h0);
      end else begin
        check("oe_rd", 16'(cpu_d_oe), 16'(e_sg));
        for (int n = 0; n < 4; n++)
          if (e_sg[n]) check("d_out", 16'(cpu_d_out[n*4 +: 4]), 16'(n[0] ? cd_rd[7:4] : cd_rd[3:0]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
