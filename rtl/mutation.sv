// mutation: flips at most one bit per 32-bit word of each of two children.
//
// For each child a 16-bit random value (rnd[31:16]) is compared with the
// mutation threshold (rate * 65536); if it is lower, the bit selected by
// rnd[15:11] is inverted. One comparison per word, as in the processor, so
// the per-word probability of a change equals the rate. Each lane has an
// enable so that a child can be passed unaltered (used to copy the elite).
// Taking the compare and position bits from the high half of a random word is
// this design's choice.
//
// Timing: one register stage; outputs are valid the clock after in_valid.
// mut_a/mut_b report, with the outputs, whether that word was changed.
module mutation
  import gap_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  word_t       a,
  input  word_t       b,
  input  logic        en_a,
  input  logic        en_b,
  input  logic [31:0] rnd_a,
  input  logic [31:0] rnd_b,
  input  logic [15:0] thresh,
  output logic        out_valid,
  output word_t       child_a,
  output word_t       child_b,
  output logic        mut_a,
  output logic        mut_b
);
  logic hit_a, hit_b;
  word_t flip_a, flip_b;

  assign hit_a  = en_a && (rnd_a[31:16] < thresh);
  assign hit_b  = en_b && (rnd_b[31:16] < thresh);
  assign flip_a = hit_a ? (word_t'(1) << rnd_a[15:11]) : '0;
  assign flip_b = hit_b ? (word_t'(1) << rnd_b[15:11]) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      child_a   <= '0;
      child_b   <= '0;
      mut_a     <= 1'b0;
      mut_b     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        child_a <= a ^ flip_a;
        child_b <= b ^ flip_b;
        mut_a   <= hit_a;
        mut_b   <= hit_b;
      end
    end
  end
endmodule
