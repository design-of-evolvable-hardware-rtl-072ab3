// tb_ehw_gap_top: end-to-end test of the evolvable hardware system at its
// default size (population 100, 6x6 array, 64 vector entries, 12 settle clocks).
//
// Four runs, one after another:
//   1. one-max, 32-bit chromosome (1 word), 40 generations
//   2. one-max, 64-bit chromosome (2 words), 60 generations
//   3. EHW, 3-bit adder (64 vectors), 2 generations
//   4. EHW, four-state machine (32 vectors), 2 generations
// Checks, for every run: the elite's fitness never drops from one generation
// to the next; the elite's chromosome, read back from the population memory,
// scores (by popcount, or by the reference model of the array) exactly the
// fitness the hardware reported, and that fitness is also in the memory's
// fitness word; for one-max, the clocks per generation equal
// POP/2 * (4*W + 13) and the final elite reaches a minimum fitness.
// Mechanisms counted (each must occur): crossover, mutation, evaluation
// stalls, overlapped pipeline stages (t(0) and t(3) high together), the
// generation -> reproduction switch, bank swaps, FIFO waits.
module tb_ehw_gap_top;
  import gap_pkg::*;
  import ehw_model_pkg::*;

  localparam int POP = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        start = 0, problem_sel = 0;
  logic [3:0]  chrom_words = 1;
  logic [15:0] max_gen = 0;
  logic        vec_we = 0;
  logic [5:0]  vec_addr = 0;
  logic [71:0] vec_wdata = 0;
  logic [6:0]  vec_count = 0;
  logic [11:0] host_addr = 0;
  word_t       host_rdata;
  logic        busy, done, gen_done, cur_bank, cross_fire, mut_fire, fe_busy;
  logic [15:0] generation;
  fit_t        gen_best_fitness;
  logic [6:0]  gen_best_addr;
  logic [23:0] ehw_out;

  ehw_gap_top dut (.*);

  int checks = 0, failures = 0;
  int n_cross = 0, n_mut = 0, n_stall = 0, n_overlap = 0, n_switch = 0,
      n_swap = 0, n_fifo_wait = 0;
  logic last_bank;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (cross_fire) n_cross++;
    if (mut_fire) n_mut++;
    if (fe_busy) n_stall++;
    if (dut.u_gap.u_ctrl.t[0] && dut.u_gap.u_ctrl.t[3]) n_overlap++;
    if (!dut.u_gap.u_fifo_b.empty && fe_busy) n_fifo_wait++;
    if (busy && cur_bank != last_bank) n_swap++;
    last_bank <= cur_bank;
    if (gen_done && generation == 0 && max_gen != 0) n_switch++;
  end

  // read one word of the population memory (only while idle)
  task automatic mem_read(input logic bank, input int ind, input int sub, output word_t w);
    host_addr = {bank, 7'(ind), 4'(sub)};
    @(posedge clk);
    #1 w = host_rdata;
  endtask

  logic [71:0] vecs[$];

  task automatic load_vectors();
    foreach (vecs[k]) begin
      @(negedge clk);
      vec_we = 1; vec_addr = 6'(k); vec_wdata = vecs[k];
    end
    @(negedge clk);
    vec_we = 0;
    vec_count = 7'(vecs.size());
  endtask

  // one run: returns the final elite fitness and address
  task automatic run(input bit sel, input int words, input int gens, input string name,
                     input int exp_gen_cycles, output int best, output int best_ind);
    int prev = -1, gcount = 0;
    longint t_last = -1, cyc = 0;
    bit mono = 1, timing_ok = 1;
    @(negedge clk);
    problem_sel = sel; chrom_words = 4'(words); max_gen = 16'(gens);
    start = 1;
    @(negedge clk);
    start = 0;
    while (1) begin
      @(posedge clk);
      cyc++;
      if (gen_done) begin
        @(posedge clk); cyc++;   // elite outputs valid the clock after
        if (int'(gen_best_fitness) < prev) mono = 0;
        prev = int'(gen_best_fitness);
        if (exp_gen_cycles > 0 && t_last >= 0 && (cyc - t_last) != exp_gen_cycles) begin
          timing_ok = 0;
          $display("  %s: generation took %0d clocks, expected %0d", name, cyc - t_last, exp_gen_cycles);
        end
        t_last = cyc;
        if (gcount % 10 == 0 || gcount == gens)
          $display("  %s gen %0d elite fitness %0d (individual %0d)", name, gcount,
                   gen_best_fitness, gen_best_addr);
        gcount++;
        if (!busy) break;
      end
    end
    check(gcount == gens + 1, $sformatf("%s: %0d generation reports, expected %0d", name, gcount, gens + 1));
    check(mono, $sformatf("%s: elite fitness dropped between generations", name));
    if (exp_gen_cycles > 0)
      check(timing_ok, $sformatf("%s: clocks per generation", name));
    best = int'(gen_best_fitness);
    best_ind = int'(gen_best_addr);
  endtask

  function automatic int popcount32(word_t w);
    int n = 0;
    for (int i = 0; i < 32; i++) n += int'(w[i]);
    return n;
  endfunction

  task automatic check_onemax(input string name, input int words, input int best, input int ind);
    word_t w; int n = 0;
    for (int k = 0; k < words; k++) begin
      mem_read(cur_bank, ind, k, w);
      n += popcount32(w);
    end
    check(n == best, $sformatf("%s: elite has %0d ones, fitness says %0d", name, n, best));
    mem_read(cur_bank, ind, 15, w);
    check(int'(w) == best, $sformatf("%s: stored fitness %0d, elite %0d", name, w, best));
  endtask

  task automatic check_ehw(input string name, input int best, input int ind);
    word_t w; cfg_t cfg; int n;
    ehw_model m = new();
    for (int k = 0; k < 9; k++) begin
      mem_read(cur_bank, ind, k, w);
      cfg[32*k +: 32] = w;
    end
    n = m.score(cfg, vecs, 12);
    check(n == best, $sformatf("%s: model scores the elite %0d, hardware %0d", name, n, best));
    mem_read(cur_bank, ind, 15, w);
    check(int'(w) == best, $sformatf("%s: stored fitness %0d, elite %0d", name, w, best));
  endtask

  initial begin
    int best, ind;
    repeat (3) @(posedge clk);
    rst_n = 1;
    last_bank = 0;
    repeat (2) @(posedge clk);

    // 1. one-max 32 bits
    run(1, 1, 40, "onemax32", POP/2 * (4*1 + 13), best, ind);
    check_onemax("onemax32", 1, best, ind);
    check(best >= 30, $sformatf("onemax32: final elite %0d below 30", best));

    // 2. one-max 64 bits
    run(1, 2, 60, "onemax64", POP/2 * (4*2 + 13), best, ind);
    check_onemax("onemax64", 2, best, ind);
    check(best >= 56, $sformatf("onemax64: final elite %0d below 56", best));

    // 3. EHW 3-bit adder
    adder_vectors(vecs);
    load_vectors();
    run(0, 9, 2, "adder", POP/2 * (2*9 + 7 + 2*(3 + 64*12)), best, ind);
    check_ehw("adder", best, ind);

    // 4. EHW state machine
    fsm_vectors(vecs);
    load_vectors();
    run(0, 9, 2, "fsm", POP/2 * (2*9 + 7 + 2*(3 + 32*12)), best, ind);
    check_ehw("fsm", best, ind);

    $display("mechanisms: crossover %0d, mutation %0d, eval stall clocks %0d, pipeline overlap %0d, gen->repro switch %0d, bank swaps %0d, fifo wait clocks %0d",
             n_cross, n_mut, n_stall, n_overlap, n_switch, n_swap, n_fifo_wait);
    check(n_cross > 0, "crossover never happened");
    check(n_mut > 0, "mutation never happened");
    check(n_stall > 0, "evaluation stall never happened");
    check(n_overlap > 0, "pipeline overlap never happened");
    check(n_switch > 0, "generation -> reproduction switch never happened");
    check(n_swap > 0, "bank swap never happened");
    check(n_fifo_wait > 0, "child b never waited in the FIFO");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
