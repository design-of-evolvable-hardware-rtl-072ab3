// onemax_fitness: fitness evaluator for the one-max problem.
//
// The fitness of a chromosome is the number of ones in it. The GAP loads the
// chromosome one 32-bit word per clock (load / word_idx / word), exactly as it
// loads an EHW configuration, then pulses start. The unit adds the population
// count of one stored word per clock and pulses done with the sum.
// Latency: done is high n_words + 2 clocks after the start pulse. The problem is one the
// processor was tested with; the word-serial counting is this design's.
module onemax_fitness
  import gap_pkg::*;
#(
  parameter int unsigned MAX_WORDS = 9,
  parameter int unsigned IDX_W     = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [IDX_W-1:0] word_idx,
  input  word_t      word,
  input  logic [IDX_W-1:0] n_words,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output fit_t       fitness
);
  word_t      words [MAX_WORDS];
  logic [IDX_W-1:0] idx;
  logic       run;

  always_ff @(posedge clk) begin
    if (load && !run && 32'(word_idx) < MAX_WORDS) words[word_idx] <= word;
  end

  function automatic fit_t popcount(input word_t w);
    fit_t n = '0;
    for (int i = 0; i < WORD_W; i++) n += fit_t'(w[i]);
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      done    <= 1'b0;
      idx     <= '0;
      fitness <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run     <= 1'b1;
        idx     <= '0;
        fitness <= '0;
      end else if (run) begin
        if (idx < n_words && 32'(idx) < MAX_WORDS) begin
          fitness <= fitness + popcount(words[idx]);
          idx     <= idx + 1'b1;
        end else begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign busy = run;
endmodule
