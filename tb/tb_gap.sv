// tb_gap: the genetic algorithm processor at its default size (population
// 100) with a stand-in evaluator that scores a chromosome by the number of
// bits equal to a fixed target pattern and answers after a random 2..12
// clocks. Three-word chromosomes, 30 generations. Checks:
//   * every individual of the final and the previous population, read back
//     through the host port, has the stored fitness that the target rule
//     gives for its stored words (what was evaluated is what was stored);
//   * the reported elite is the first individual with the highest fitness;
//   * individual 0 of each new population is an exact copy of the previous
//     generation's elite, and the elite fitness never drops;
//   * the population improves (final elite above the initial elite).
module tb_gap;
  import gap_pkg::*;
  localparam int POP = 100, W = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] chrom_words = 4'(W);
  logic [15:0] max_gen = 16'd30;
  logic busy, done, gen_done, cur_bank, fe_clear, fe_load, fe_start, cross_fire, mut_fire;
  logic fe_done = 0;
  logic [15:0] generation;
  fit_t gen_best_fitness, fe_fitness = 0;
  logic [6:0] gen_best_addr;
  logic [3:0] fe_word_idx;
  word_t fe_word, host_rdata;
  logic [11:0] host_addr = 0;
  always #5 clk = !clk;

  gap dut (.*);

  int checks = 0, failures = 0;

  function automatic word_t target(int k);
    return 32'hC3A5_0F96 ^ (32'h1111_1111 * k);
  endfunction

  function automatic int score(word_t w[W]);
    int n = 0;
    for (int k = 0; k < W; k++)
      for (int b = 0; b < 32; b++) n += int'(w[k][b] == target(k)[b]);
    return n;
  endfunction

  // stand-in evaluator
  word_t loaded[W];
  int wait_left = -1;
  always @(posedge clk) begin
    fe_done <= 0;
    if (fe_load) loaded[fe_word_idx] <= fe_word;
    if (fe_start) wait_left <= $urandom_range(1, 11);
    else if (wait_left > 0) wait_left <= wait_left - 1;
    else if (wait_left == 0) begin
      fe_done <= 1;
      fe_fitness <= fit_t'(score(loaded));
      wait_left <= -1;
    end
  end

  task automatic rd(input logic bank, input int ind, input int sub, output word_t w);
    host_addr = {bank, 7'(ind), 4'(sub)};
    @(negedge clk);
    w = host_rdata;
  endtask

  task automatic check_pop(input logic bank, input string name, output int best, output int best_i);
    word_t w[W]; word_t f;
    best = -1; best_i = 0;
    for (int i = 0; i < POP; i++) begin
      for (int k = 0; k < W; k++) rd(bank, i, k, w[k]);
      rd(bank, i, 15, f);
      checks++;
      if (int'(f) != score(w)) begin failures++; $display("FAIL: %s individual %0d stored %0d scores %0d", name, i, f, score(w)); end
      if (int'(f) > best) begin best = int'(f); best_i = i; end
    end
  endtask

  initial begin
    int first_best = -1, prev_best = -1, prev_addr = 0, b_new, i_new, b_old, i_old;
    word_t e_old[W], c0[W];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (busy) begin
      @(negedge clk);
      if (gen_done) begin
        @(negedge clk);
        if (first_best < 0) first_best = int'(gen_best_fitness);
        checks++;
        if (int'(gen_best_fitness) < prev_best) begin failures++; $display("FAIL: elite dropped"); end
        prev_best = int'(gen_best_fitness);
        if (generation % 10 == 0) $display("  generation %0d elite %0d", generation, gen_best_fitness);
      end
    end
    // final population
    check_pop(cur_bank, "final", b_new, i_new);
    checks += 2;
    if (b_new != int'(gen_best_fitness)) begin failures++; $display("FAIL: elite %0d, population best %0d", gen_best_fitness, b_new); end
    if (i_new != int'(gen_best_addr)) begin failures++; $display("FAIL: elite at %0d, first best at %0d", gen_best_addr, i_new); end
    // previous population and the elite copy
    check_pop(!cur_bank, "previous", b_old, i_old);
    for (int k = 0; k < W; k++) begin
      rd(!cur_bank, i_old, k, e_old[k]);
      rd(cur_bank, 0, k, c0[k]);
      checks++;
      if (e_old[k] != c0[k]) begin failures++; $display("FAIL: individual 0 word %0d is not the previous elite", k); end
    end
    checks++;
    if (prev_best <= first_best) begin failures++; $display("FAIL: no improvement (%0d -> %0d)", first_best, prev_best); end
    $display("  initial elite %0d, final elite %0d of %0d", first_best, prev_best, 32 * W);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
