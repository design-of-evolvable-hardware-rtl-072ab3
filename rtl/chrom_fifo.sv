// chrom_fifo: first-in first-out buffer for the words of one child.
//
// While the first child of a pair is evaluated, both children's words wait
// here; they are written back to the population memory (and the second child
// is loaded into the evaluator) as they are popped. Show-ahead: rdata is the
// oldest word whenever empty is low, and pop removes it at the clock edge.
// Depth and the show-ahead style are this design's choice.
module chrom_fifo
  import gap_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  push,
  input  word_t wdata,
  input  logic  pop,
  output word_t rdata,
  output logic  empty,
  output logic  full
);
  localparam int unsigned PW = $clog2(DEPTH);
  word_t         buf_q [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   count;

  assign empty = (count == 0);
  assign full  = (count == (PW+1)'(DEPTH));
  assign rdata = buf_q[rp];

  always_ff @(posedge clk) begin
    if (push && !full) buf_q[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (clr) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push && !full)  wp <= (wp == PW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop && !empty)  rp <= (rp == PW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(push && !full) - (PW+1)'(pop && !empty);
    end
  end

  no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
