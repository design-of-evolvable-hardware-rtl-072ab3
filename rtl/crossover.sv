// crossover: one-point crossover of two chromosomes, one 32-bit word at a time.
//
// The cut point is a bit index into the whole chromosome, drawn once per
// parent pair. For word k, bit j has chromosome index 32*k + j; bits below
// the cut come from the child's own parent, bits at or above it from the
// other parent:
//   child_a = (a & mask) | (b & ~mask),  child_b = (b & mask) | (a & ~mask).
// With do_cross low the parents pass unchanged. Because the mask is built
// from the word index, a chromosome of any length streams through without
// storage. The crossover module is the processor's; the one-point scheme is
// this design's choice.
//
// Timing: one register stage; outputs are valid the clock after in_valid.
module crossover
  import gap_pkg::*;
#(
  parameter int unsigned IDX_W = 4,                // width of the word index
  localparam int unsigned CUT_W = IDX_W + 5        // width of the cut (bit) index
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  word_t            a,
  input  word_t            b,
  input  logic [IDX_W-1:0] word_idx,
  input  logic [CUT_W-1:0] cut,
  input  logic             do_cross,
  output logic             out_valid,
  output word_t            child_a,
  output word_t            child_b
);
  word_t mask;

  always_comb begin
    for (int j = 0; j < WORD_W; j++) begin
      mask[j] = !do_cross ||
                ((CUT_W+1)'({word_idx, 5'(j)}) < (CUT_W+1)'(cut));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      child_a   <= '0;
      child_b   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        child_a <= (a & mask) | (b & ~mask);
        child_b <= (b & mask) | (a & ~mask);
      end
    end
  end
endmodule
