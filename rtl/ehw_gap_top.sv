// ehw_gap_top: one-chip evolvable hardware, a genetic algorithm processor
// evolving the configuration of an array of XC6200-style logic cells.
//
// The GAP holds a population of configurations. Each chromosome is streamed
// word by word into the configuration register of the EHW array inside the
// fitness unit, which drives the stored evaluation vectors through the array
// and returns the number of vectors whose outputs came out right. No external
// processor or configuration download is involved: the whole loop of
// generate, configure, measure and select runs in hardware.
//
// problem_sel chooses the evaluator: 0 the EHW fitness unit (chromosome =
// 9 words = 288 configuration bits for the 6x6 array), 1 a one-max evaluator
// (fitness = number of one bits) used to exercise the GAP on its own with any
// chromosome length. problem_sel and chrom_words must be stable during a run.
//
// Use: reset; write the evaluation vectors (vec_we/vec_addr/vec_wdata,
// {mask, expected, input} per entry) and set vec_count; set chrom_words and
// max_gen; pulse start. gen_done pulses after the initial population and each
// generation; gen_best_fitness/gen_best_addr (elite) are valid the clock
// after. done pulses at the end. While busy is low the population memory can
// be read through host_addr = {bank, individual, word} (word 2**4-1 holds the
// fitness); host_rdata follows one clock later.
module ehw_gap_top
  import gap_pkg::*;
#(
  parameter int unsigned POP_SIZE  = 100,
  parameter int unsigned ROWS      = 6,
  parameter int unsigned COLS      = 6,
  parameter int unsigned VEC_DEPTH = 64,
  parameter int unsigned SETTLE    = 12,
  localparam int unsigned NWORDS = (8 * ROWS * COLS + WORD_W - 1) / WORD_W,
  localparam int unsigned SUB_W  = $clog2(NWORDS + 1),
  localparam int unsigned MAIN_W = $clog2(POP_SIZE),
  localparam int unsigned AW     = 1 + MAIN_W + SUB_W,
  localparam int unsigned EDGE   = 2 * (ROWS + COLS),
  localparam int unsigned VAW    = $clog2(VEC_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              problem_sel,
  input  logic [SUB_W-1:0]  chrom_words,
  input  logic [15:0]       max_gen,
  // evaluation vectors
  input  logic              vec_we,
  input  logic [VAW-1:0]    vec_addr,
  input  logic [3*EDGE-1:0] vec_wdata,
  input  logic [VAW:0]      vec_count,
  // host read of the population memory
  input  logic [AW-1:0]     host_addr,
  output word_t             host_rdata,
  // status
  output logic              busy,
  output logic              done,
  output logic              gen_done,
  output logic [15:0]       generation,
  output fit_t              gen_best_fitness,
  output logic [MAIN_W-1:0] gen_best_addr,
  output logic              cur_bank,
  output logic [EDGE-1:0]   ehw_out,
  output logic              cross_fire,
  output logic              mut_fire,
  output logic              fe_busy
);
  logic       fe_clear, fe_load, fe_start, fe_done;
  logic [SUB_W-1:0] fe_word_idx;
  word_t      fe_word;
  fit_t       fe_fitness;

  gap #(.POP_SIZE(POP_SIZE), .SUB_W(SUB_W)) u_gap (
    .clk, .rst_n, .start, .chrom_words, .max_gen, .busy, .done, .gen_done,
    .generation, .gen_best_fitness, .gen_best_addr, .cur_bank,
    .fe_clear, .fe_load, .fe_word_idx, .fe_word, .fe_start, .fe_done, .fe_fitness,
    .host_addr, .host_rdata, .cross_fire, .mut_fire
  );

  // EHW fitness unit
  logic ehw_busy, ehw_done;
  fit_t ehw_fit;
  ehw_fitness_unit #(.ROWS(ROWS), .COLS(COLS), .DEPTH(VEC_DEPTH), .SETTLE(SETTLE), .IDX_W(SUB_W)) u_ehw (
    .clk, .rst_n,
    .clear(fe_clear && !problem_sel), .load(fe_load && !problem_sel),
    .word_idx(fe_word_idx), .word(fe_word), .start(fe_start && !problem_sel),
    .busy(ehw_busy), .done(ehw_done), .fitness(ehw_fit),
    .vec_we, .vec_waddr(vec_addr), .vec_wdata, .vec_count,
    .edge_out(ehw_out)
  );

  // one-max evaluator
  logic om_busy, om_done;
  fit_t om_fit;
  onemax_fitness #(.MAX_WORDS(2**SUB_W - 1), .IDX_W(SUB_W)) u_onemax (
    .clk, .rst_n, .load(fe_load && problem_sel), .word_idx(fe_word_idx), .word(fe_word),
    .n_words(chrom_words), .start(fe_start && problem_sel),
    .busy(om_busy), .done(om_done), .fitness(om_fit)
  );

  assign fe_done    = problem_sel ? om_done : ehw_done;
  assign fe_fitness = problem_sel ? om_fit  : ehw_fit;
  assign fe_busy    = problem_sel ? om_busy : ehw_busy;
endmodule
