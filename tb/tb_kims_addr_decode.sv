// tb_kims_addr_decode: checks the I/O decoder against the register map.
//
// Sweeps every address from 000h to 3FFh, with AEN and DACK3 in all four
// combinations, and also a default-base sweep of the upper address bits.
// Expected: gen_n low only for a CPU cycle (AEN low) at 140h..145h, link_n
// low for a CPU cycle at 146h..147h or for any DMA cycle with DACK3 low.
module tb_kims_addr_decode;
  import kims_pkg::*;

  logic [15:0] addr;
  logic aen, dack_n, gen_n, link_n;
  int checks = 0, failures = 0;

  kims_addr_decode dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_gen, exp_link;
    for (int a = 0; a < 16'h0400; a++) begin
      for (int m = 0; m < 4; m++) begin
        addr = 16'(a); aen = m[0]; dack_n = m[1];
        #1;
        exp_gen  = !aen && a >= 'h140 && a <= 'h145;
        exp_link = (!aen && (a == 'h146 || a == 'h147)) || (aen && !dack_n);
        checks++;
        if (gen_n !== !exp_gen || link_n !== !exp_link) begin
          failures++;
          if (failures < 10)
            $display("FAIL addr=%h aen=%b dack_n=%b gen_n=%b link_n=%b", addr, aen, dack_n, gen_n, link_n);
        end
      end
    end
    // Aliases with upper address bits set must not decode.
    for (int k = 1; k < 64; k++) begin
      addr = 16'h0146 | 16'(k << 10); aen = 0; dack_n = 1; #1;
      checks++;
      if (!link_n || !gen_n) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
