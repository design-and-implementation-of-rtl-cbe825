// kims_link_fifo: the buffer of one link direction (2048 x 8).
//
// Stands in for the IDT7203-class FIFO of each link: the local CE writes
// into it, the remote CE reads from it. The word at the head is always
// visible on q (first-word fall-through), so a read strobe of the remote CE
// sees its data in the same bus cycle and removes it at the clock edge that
// ends the cycle. A write while full and a read while empty are ignored, as
// the original part does. Flags are active low like the part's EF and FF
// pins: empty_n low when nothing is stored, full_n low when DEPTH words are.
// mr_n (master reset) empties the FIFO at the next clock edge.
//
// The original part is asynchronous; this model uses one clock for both
// ports, with one clock per bus cycle. Depth 2048 follows the 2 KB FIFO of
// each link; the ninth bit of the 2048 x 9 part is unused by the 8-bit link.
module kims_link_fifo
  import kims_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH,
  parameter int unsigned WIDTH = LINK_WIDTH
) (
  input  logic             clk,
  input  logic             mr_n,     // master reset, active low
  input  logic             w_n,      // write strobe, active low
  input  logic [WIDTH-1:0] d,
  input  logic             r_n,      // read strobe, active low
  output logic [WIDTH-1:0] q,        // head word
  output logic             empty_n,
  output logic             full_n
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  always_comb begin
    empty_n = (count != '0);
    full_n  = (count != (AW+1)'(DEPTH));
    do_wr   = ~w_n & full_n;
    do_rd   = ~r_n & empty_n;
    q       = mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (!mr_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= d;
  end

  // A word is never accepted beyond the depth.
  assert property (@(posedge clk) disable iff (!mr_n) count <= (AW+1)'(DEPTH));

endmodule
