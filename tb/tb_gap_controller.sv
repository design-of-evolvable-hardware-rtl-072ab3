// tb_gap_controller: runs the controller with a small population (4), a
// two-word chromosome and two generations against a stand-in evaluator that
// answers fe_done a fixed 5 clocks after fe_start. Every memory write and
// evaluator load is logged and compared with the sequence worked out from
// the control tables:
//   generation:   per individual i: words {0,i,0},{0,i,1} (port A, random),
//                 loads 0,1, then fitness {0,i,15}
//   reproduction: per pair i: loads 0,1 (child a), fitness {nxt,i,15} on A,
//                 words {nxt,i,k} on A with {nxt,i+1,k} on B, loads 0,1
//                 (child b), fitness {nxt,i+1,15} on B
// Also checks the read addresses (parent a = elite address, parent b inside
// the population), crossover/mutation/FIFO strobes per word, the clocks per
// pair, (W+1) + 3 + (EVAL+1) + 1 + (W+1) + (EVAL+1) + 1, and done /
// generation.
module tb_gap_controller;
  import gap_pkg::*;
  localparam int POP = 4, W = 2, EVAL = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] chrom_words = 4'(W);
  logic [15:0] max_gen = 16'd2;
  logic busy, done, gen_done, seed_ld, cur_bank;
  logic [15:0] generation;
  mode_e mode;
  logic [3:0] time_step;
  logic [31:0] rnd_sel = 0, rnd_cross = 0;
  logic we_a, we_b, wsel_fit, wsel_rand;
  logic [6:0] addr_a, addr_b;
  logic cross_in, do_cross, mutation_in, mut_en_a, fifo_in, fifo_out, fifo_clr;
  logic [3:0] cross_idx;
  logic [6:0] cut;
  logic fe_load, fe_start, fe_clear, fe_done = 0;
  logic [3:0] fe_word_idx;
  logic [1:0] sel_chrom;
  logic elite_upd, elite_commit;
  logic [1:0] elite_addr, elite_best_addr = 2'd3;
  always #5 clk = !clk;

  gap_controller #(.POP_SIZE(POP), .SUB_W(4)) dut (.*);

  int checks = 0, failures = 0;
  string got[$], exp_log[$];
  int eval_cnt = -1;
  longint cyc = 0;
  longint pair_start[$];

  always @(posedge clk) rnd_sel <= $urandom;
  always @(posedge clk) rnd_cross <= $urandom;

  // stand-in evaluator
  always @(posedge clk) begin
    cyc <= cyc + 1;
    fe_done <= 0;
    if (fe_start) eval_cnt <= 0;
    else if (eval_cnt >= 0) begin
      eval_cnt <= eval_cnt + 1;
      if (eval_cnt == EVAL - 2) begin fe_done <= 1; eval_cnt <= -1; end
    end
  end

  // log
  always @(posedge clk) if (rst_n) begin
    if (we_a) got.push_back($sformatf("A%s %0d.%0d.%0d", wsel_fit ? "f" : "w", addr_a[6], addr_a[5:4], addr_a[3:0]));
    if (we_b) got.push_back($sformatf("B%s %0d.%0d.%0d", wsel_fit ? "f" : "w", addr_b[6], addr_b[5:4], addr_b[3:0]));
    if (fe_load) got.push_back($sformatf("L%0d %0d", sel_chrom, fe_word_idx));
    if (mode == MODE_REPRO && time_step == 0 && dut.less) begin
      checks += 2;
      if (addr_a[5:4] != elite_best_addr) begin failures++; $display("FAIL: parent a address %0d", addr_a[5:4]); end
      if (addr_a[6] != addr_b[6] || addr_b[5:4] >= POP) begin failures++; $display("FAIL: parent b address"); end
    end
    if (mode == MODE_REPRO && time_step == 0 && dut.u_cc.bit_count == 0 && dut.less) pair_start.push_back(cyc);
  end

  int n_cross = 0, n_mut = 0, n_push = 0, n_pop = 0;
  always @(posedge clk) begin
    if (cross_in) n_cross++;
    if (mutation_in) n_mut++;
    if (fifo_in) n_push++;
    if (fifo_out) n_pop++;
  end

  initial begin
    int gens_seen = 0;
    // expected log
    for (int i = 0; i < POP; i++) begin
      for (int k = 0; k < W; k++) begin
        exp_log.push_back($sformatf("Aw 0.%0d.%0d", i, k));
        exp_log.push_back($sformatf("L0 %0d", k));
      end
      exp_log.push_back($sformatf("Af 0.%0d.15", i));
    end
    for (int g = 0; g < 2; g++) begin
      int nb;
      nb = (g == 0) ? 1 : 0;
      for (int i = 0; i < POP; i += 2) begin
        for (int k = 0; k < W; k++) exp_log.push_back($sformatf("L1 %0d", k));
        exp_log.push_back($sformatf("Af %0d.%0d.15", nb, i));
        for (int k = 0; k < W; k++) begin
          exp_log.push_back($sformatf("Aw %0d.%0d.%0d", nb, i, k));
          exp_log.push_back($sformatf("Bw %0d.%0d.%0d", nb, i + 1, k));
          exp_log.push_back($sformatf("L2 %0d", k));
        end
        exp_log.push_back($sformatf("Bf %0d.%0d.15", nb, i + 1));
      end
    end

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      if (gen_done) gens_seen++;
    end
    repeat (3) @(negedge clk);

    checks++;
    if (got.size() != exp_log.size()) begin failures++; $display("FAIL: %0d log entries, expected %0d", got.size(), exp_log.size()); end
    foreach (exp_log[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp_log[i]) begin
        failures++;
        $display("FAIL: log %0d got '%s' expected '%s'", i, (i < got.size()) ? got[i] : "-", exp_log[i]);
      end
    end
    // per word strobes: 2 generations * POP/2 pairs * W words
    checks += 4;
    if (n_cross != 2 * POP / 2 * W) begin failures++; $display("FAIL: cross strobes %0d", n_cross); end
    if (n_mut   != 2 * POP / 2 * W) begin failures++; $display("FAIL: mutation strobes %0d", n_mut); end
    if (n_push  != 2 * POP / 2 * W) begin failures++; $display("FAIL: fifo pushes %0d", n_push); end
    if (n_pop   != 2 * POP / 2 * W) begin failures++; $display("FAIL: fifo pops %0d", n_pop); end
    // clocks per pair: (W+1) + 3 + (EVAL+1) + 1 + (W+1) + (EVAL+1) + 1
    for (int p = 1; p < pair_start.size(); p++) begin
      checks++;
      if (pair_start[p] - pair_start[p-1] != 2*W + 7 + 2*(EVAL + 1)) begin
        failures++; $display("FAIL: pair took %0d clocks", pair_start[p] - pair_start[p-1]);
      end
    end
    checks += 3;
    if (gens_seen != 3) begin failures++; $display("FAIL: %0d generation reports", gens_seen); end
    if (generation != 2) begin failures++; $display("FAIL: generation %0d", generation); end
    if (busy) begin failures++; $display("FAIL: still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
