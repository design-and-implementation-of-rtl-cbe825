// tb_kims_matmul: the two-CE matrix multiplication workload over link 0.
//
// Both CEs hold A and B (N x N, 16-bit integers). CE 0 computes the first
// N/2 rows of C = A*B and CE 1 the last N/2 rows; CE 1 then sends its half,
// N*N/2 words = N*N bytes, to CE 0 over link 0 and CE 0 assembles C. The
// arithmetic is host software, done here by the testbench; what is under
// test is the transfer. Runs N = 10, 50 and 100 in DMA mode (both DMA
// controllers active at once, sender and receiver flow-controlled by DRQ3)
// and N = 10 in polled mode. The assembled C is compared with a direct
// product. Both CEs and all sizes use the system's default parameters.
module tb_kims_matmul;
  import kims_pkg::*;
  localparam int NL = 16;
  localparam logic [15:0] B = 16'h0140;
  localparam int NMAX = 100;

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

  int checks = 0, failures = 0, stalls = 0;
  logic [15:0] a [NMAX][NMAX], b [NMAX][NMAX], c [NMAX][NMAX];
  logic [7:0]  txbuf [NMAX*NMAX], rxbuf [NMAX*NMAX];

  kims_system dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle(int n);
    addr[n] = 16'h0000; aen[n] = 0; dack3_n[n] = 1; iord_n[n] = 1; iowr_n[n] = 1; d_in[n] = '0;
  endtask

  task automatic io_write(int n, logic [15:0] ad, logic [15:0] v);
    @(negedge clk); idle(n); addr[n] = ad; d_in[n] = v; iowr_n[n] = 0;
    @(negedge clk); idle(n); #1;
  endtask

  task automatic io_read(int n, logic [15:0] ad, output logic [15:0] v);
    @(negedge clk); idle(n); addr[n] = ad; iord_n[n] = 0; #1;
    v = d_out[n];
    @(negedge clk); idle(n); #1;
  endtask

  // dwrite: DMA from CE n's memory buffer to link 0.
  task automatic dwrite(int n, int size);
    int sent = 0;
    io_write(n, B + 0, 16'h0001);
    io_write(n, B + 2, 16'h0002);
    while (sent < size) begin
      @(negedge clk);
      if (drq3[n]) begin
        aen[n] = 1; dack3_n[n] = 0; iowr_n[n] = 0; d_in[n] = 16'(txbuf[sent]);
        @(negedge clk); idle(n); sent++;
        if (sent % 16 == 0) repeat (20) @(negedge clk);  // bus shared with other work
      end else stalls++;
    end
    io_write(n, B + 2, 16'h0000);
  endtask

  // dread: DMA from link 0 into CE n's memory buffer.
  task automatic dread(int n, int size);
    int got = 0;
    io_write(n, B + 0, 16'h0001);
    io_write(n, B + 2, 16'h0003);
    while (got < size) begin
      @(negedge clk);
      if (drq3[n]) begin
        aen[n] = 1; dack3_n[n] = 0; iord_n[n] = 0; #1;
        rxbuf[got] = d_out[n][7:0];
        @(negedge clk); idle(n); got++;
      end else stalls++;
    end
    io_write(n, B + 2, 16'h0000);
  endtask

  // bwrite/bread with status polling.
  task automatic bwrite(int n, int size);
    logic [15:0] ff;
    io_write(n, B + 0, 16'h0001);
    for (int i = 0; i < size; i++) begin
      do io_read(n, B + 4, ff); while (!ff[0]);
      io_write(n, B + 6, 16'(txbuf[i]));
    end
  endtask

  task automatic bread(int n, int size);
    logic [15:0] fe, v;
    io_write(n, B + 0, 16'h0001);
    for (int i = 0; i < size; i++) begin
      do io_read(n, B + 2, fe); while (!fe[0]);
      io_read(n, B + 6, v);
      rxbuf[i] = v[7:0];
    end
  endtask

  task automatic run(int N, bit use_dma);
    logic [15:0] ref_c, acc;
    int bytes, errs;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a[i][j] = 16'($urandom_range(0, 20));
        b[i][j] = 16'($urandom_range(0, 20));
      end
    // CE 1 computes rows N/2..N-1 and packs them little-endian.
    bytes = 0;
    for (int i = N/2; i < N; i++)
      for (int j = 0; j < N; j++) begin
        acc = 0;
        for (int k = 0; k < N; k++) acc += a[i][k] * b[k][j];
        txbuf[bytes] = acc[7:0]; txbuf[bytes+1] = acc[15:8];
        bytes += 2;
      end
    // CE 0 computes rows 0..N/2-1.
    for (int i = 0; i < N/2; i++)
      for (int j = 0; j < N; j++) begin
        acc = 0;
        for (int k = 0; k < N; k++) acc += a[i][k] * b[k][j];
        c[i][j] = acc;
      end
    fork
      if (use_dma) dwrite(1, bytes); else bwrite(1, bytes);
      if (use_dma) dread(0, bytes);  else bread(0, bytes);
    join
    for (int i = N/2; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int o; o = 2 * ((i - N/2) * N + j);
        c[i][j] = {rxbuf[o+1], rxbuf[o]};
      end
    errs = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        ref_c = 0;
        for (int k = 0; k < N; k++) ref_c += a[i][k] * b[k][j];
        checks++;
        if (c[i][j] != ref_c) begin errs++; failures++; end
      end
    $display("N=%0d %s: %0d bytes moved, %0d wrong elements, %0d stall cycles so far",
             N, use_dma ? "DMA" : "polling", bytes, errs, stalls);
  endtask

  initial begin
    for (int n = 0; n < 2; n++) begin
      idle(n); rst[n] = 1;
      for (int l = 0; l < NL - 1; l++) ext_link_in[n][l] = '{data: 8'h00, empty_n: 1'b0, rd_n: 1'b1};
    end
    repeat (3) @(negedge clk);
    rst[0] = 0; rst[1] = 0;
    run(10, 0);
    run(10, 1);
    run(50, 1);
    run(100, 1);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no DMA stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
