// gap: pipelined genetic algorithm processor.
//
// Evolves a population of POP_SIZE chromosomes of 1..2**SUB_W-1 32-bit words
// (chrom_words, set per run) against an external fitness evaluator. The data
// path is one 32-bit word wide whatever the chromosome length: each word of
// a parent pair flows read -> crossover -> mutation -> child FIFOs /
// evaluator, one stage per clock, so long chromosomes cost cycles rather
// than wide hardware. Only fitness and address of the best individual are
// kept (elite module), not its bits.
//
// Blocks: gap_controller (sequencing, with the counter control unit),
// gap_memory (dual port, {bank, individual, word} addressing), crossover,
// mutation, two chrom_fifo buffers (one per child: the second child waits
// while the first is evaluated), elite, and four rng generators (parent
// choice, crossover decision, one per mutation lane).
//
// Evaluator port: fe_load/fe_word_idx/fe_word deliver a chromosome one word
// per clock; fe_start begins evaluation; the evaluator answers with a
// one-clock fe_done and holds fe_fitness until the next start; fe_clear is
// pulsed after each fitness is stored.
//
// Host port: while busy is low, port A of the memory reads host_addr
// ({bank, individual, word}); host_rdata follows one clock later.
// Reports: gen_done pulses at the end of the initial population and of every
// generation, with gen_best_fitness / gen_best_addr (elite of that
// generation) valid from the next clock; cur_bank names the bank holding the
// latest population.
module gap
  import gap_pkg::*;
#(
  parameter int unsigned POP_SIZE     = 100,
  parameter int unsigned SUB_W        = 4,
  parameter logic [15:0] CROSS_THRESH = CROSS_THRESH_DEFAULT,
  parameter logic [15:0] MUT_THRESH   = MUT_THRESH_DEFAULT,
  localparam int unsigned MAIN_W = $clog2(POP_SIZE),
  localparam int unsigned AW     = 1 + MAIN_W + SUB_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [SUB_W-1:0]  chrom_words,
  input  logic [15:0]       max_gen,
  output logic              busy,
  output logic              done,
  output logic              gen_done,
  output logic [15:0]       generation,
  output fit_t              gen_best_fitness,
  output logic [MAIN_W-1:0] gen_best_addr,
  output logic              cur_bank,
  // fitness evaluator
  output logic              fe_clear,
  output logic              fe_load,
  output logic [SUB_W-1:0]  fe_word_idx,
  output word_t             fe_word,
  output logic              fe_start,
  input  logic              fe_done,
  input  fit_t              fe_fitness,
  // host read
  input  logic [AW-1:0]     host_addr,
  output word_t             host_rdata,
  // activity, for observation
  output logic              cross_fire,
  output logic              mut_fire
);
  localparam int unsigned CUT_W = SUB_W + 5;

  logic [31:0] rnd_sel, rnd_cross, rnd_mut_a, rnd_mut_b;
  logic        seed_ld;

  rng #(.A(32'd1664525),   .B(32'd1013904223)) u_rng_sel   (.clk, .rst_n, .seed_ld, .rnd(rnd_sel));
  rng #(.A(32'd22695477),  .B(32'd1))          u_rng_cross (.clk, .rst_n, .seed_ld, .rnd(rnd_cross));
  rng #(.A(32'd1103515245),.B(32'd12345))      u_rng_mut_a (.clk, .rst_n, .seed_ld, .rnd(rnd_mut_a));
  rng #(.A(32'd134775813), .B(32'd1))          u_rng_mut_b (.clk, .rst_n, .seed_ld, .rnd(rnd_mut_b));

  // controller
  mode_e             mode;
  logic [3:0]        time_step;
  logic              we_a, we_b, wsel_fit, wsel_rand;
  logic [AW-1:0]     c_addr_a, c_addr_b;
  logic              cross_in, do_cross, mutation_in, mut_en_a;
  logic [SUB_W-1:0]  cross_idx;
  logic [CUT_W-1:0]  cut;
  logic              fifo_in, fifo_out, fifo_clr;
  logic [1:0]        sel_chrom;
  logic              elite_upd, elite_commit;
  logic [MAIN_W-1:0] elite_addr, best_addr;
  fit_t              best_fitness, cur_fitness;
  logic [MAIN_W-1:0] cur_addr;
  logic              cur_valid;

  gap_controller #(.POP_SIZE(POP_SIZE), .SUB_W(SUB_W), .CROSS_THRESH(CROSS_THRESH)) u_ctrl (
    .clk, .rst_n, .start, .chrom_words, .max_gen, .busy, .done, .gen_done, .generation,
    .mode, .time_step, .cur_bank, .seed_ld, .rnd_sel, .rnd_cross,
    .we_a, .addr_a(c_addr_a), .we_b, .addr_b(c_addr_b), .wsel_fit, .wsel_rand,
    .cross_in, .cross_idx, .cut, .do_cross, .mutation_in, .mut_en_a,
    .fifo_in, .fifo_out, .fifo_clr,
    .fe_load, .fe_word_idx, .sel_chrom, .fe_start, .fe_clear, .fe_done,
    .elite_upd, .elite_addr, .elite_commit, .elite_best_addr(best_addr)
  );

  // memory
  word_t         rdata_a, rdata_b, wdata_a, wdata_b, fifo_a_q, fifo_b_q;
  logic [AW-1:0] addr_a;
  assign addr_a  = busy ? c_addr_a : host_addr;
  assign wdata_a = wsel_fit ? word_t'(fe_fitness) : (wsel_rand ? rnd_sel : fifo_a_q);
  assign wdata_b = wsel_fit ? word_t'(fe_fitness) : fifo_b_q;
  assign host_rdata = rdata_a;

  gap_memory #(.AW(AW)) u_mem (
    .clk, .we_a, .addr_a, .wdata_a, .rdata_a,
    .we_b, .addr_b(c_addr_b), .wdata_b, .rdata_b
  );

  // crossover -> mutation
  word_t x_a, x_b, m_a, m_b;
  logic  x_valid, m_valid, mut_a, mut_b;

  crossover #(.IDX_W(SUB_W)) u_cross (
    .clk, .rst_n, .in_valid(cross_in), .a(rdata_a), .b(rdata_b),
    .word_idx(cross_idx), .cut, .do_cross,
    .out_valid(x_valid), .child_a(x_a), .child_b(x_b)
  );

  mutation u_mut (
    .clk, .rst_n, .in_valid(mutation_in), .a(x_a), .b(x_b),
    .en_a(mut_en_a), .en_b(1'b1), .rnd_a(rnd_mut_a), .rnd_b(rnd_mut_b),
    .thresh(MUT_THRESH), .out_valid(m_valid), .child_a(m_a), .child_b(m_b),
    .mut_a, .mut_b
  );

  // child FIFOs
  logic fa_empty, fa_full, fb_empty, fb_full;
  chrom_fifo #(.DEPTH(2**SUB_W)) u_fifo_a (
    .clk, .rst_n, .clr(fifo_clr), .push(fifo_in), .wdata(m_a),
    .pop(fifo_out), .rdata(fifo_a_q), .empty(fa_empty), .full(fa_full)
  );
  chrom_fifo #(.DEPTH(2**SUB_W)) u_fifo_b (
    .clk, .rst_n, .clr(fifo_clr), .push(fifo_in), .wdata(m_b),
    .pop(fifo_out), .rdata(fifo_b_q), .empty(fb_empty), .full(fb_full)
  );

  // word to the evaluator (sel_chrom)
  always_comb begin
    unique case (sel_chrom)
      2'd1:    fe_word = m_a;
      2'd2:    fe_word = fifo_b_q;
      default: fe_word = rnd_sel;
    endcase
  end

  // elite
  elite #(.ADDR_W(MAIN_W)) u_elite (
    .clk, .rst_n, .upd(elite_upd), .fitness(fe_fitness), .addr(elite_addr),
    .commit(elite_commit), .cur_fitness, .cur_addr, .cur_valid,
    .best_fitness, .best_addr
  );

  assign gen_best_fitness = best_fitness;
  assign gen_best_addr    = best_addr;
  assign cross_fire       = x_valid && do_cross;
  assign mut_fire         = m_valid && (mut_a || mut_b);

  stage_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                  fifo_in |-> m_valid);
endmodule
