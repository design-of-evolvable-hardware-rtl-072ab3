// tb_ehw_evolution: longer evolution runs on the default 6x6 array, as far
// as simulation time allows: the 3-bit adder for 600 generations and the
// four-state machine for 300. Prints the elite fitness every 50 generations.
// Checks, for both runs: the elite fitness never drops; every generation
// report arrives; the final elite chromosome, read back from memory, scores
// in the reference model exactly the fitness the hardware reported and
// stored. It does not require the evolution to reach any particular fitness.
// The run lengths can be changed with +ADDER_GENS=<n> and +FSM_GENS=<n>
// (the watchdog allows about 1000 adder generations; raise WDOG_CLOCKS with
// +WDOG=<clocks> for longer runs).
module tb_ehw_evolution;
  import gap_pkg::*;
  import ehw_model_pkg::*;
  localparam int W = 9, SETTLE = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        start = 0, problem_sel = 0;
  logic [3:0]  chrom_words = 4'(W);
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
  logic [71:0] vecs[$];

  task automatic evolve(input string name, input int gens);
    int prev = -1, seen = 0, n;
    cfg_t cfg;
    word_t w;
    ehw_model m = new();
    foreach (vecs[k]) begin
      @(negedge clk);
      vec_we = 1; vec_addr = 6'(k); vec_wdata = vecs[k];
    end
    @(negedge clk);
    vec_we = 0;
    vec_count = 7'(vecs.size());
    max_gen = 16'(gens);
    start = 1;
    @(negedge clk);
    start = 0;
    while (1) begin
      @(posedge clk);
      if (gen_done) begin
        @(posedge clk);
        checks++;
        if (int'(gen_best_fitness) < prev) begin failures++; $display("FAIL: %s elite dropped", name); end
        prev = int'(gen_best_fitness);
        if (seen % 50 == 0 && seen <= 1000 || seen % 1000 == 0 || !busy)
          $display("  %s generation %0d elite fitness %0d of %0d", name, seen, gen_best_fitness, vecs.size());
        seen++;
        if (!busy) break;
      end
    end
    for (int k = 0; k < W; k++) begin
      host_addr = {cur_bank, gen_best_addr, 4'(k)};
      @(posedge clk); #1;
      cfg[32*k +: 32] = host_rdata;
    end
    host_addr = {cur_bank, gen_best_addr, 4'd15};
    @(posedge clk); #1;
    w = host_rdata;
    n = m.score(cfg, vecs, SETTLE);
    checks += 3;
    if (seen != gens + 1) begin failures++; $display("FAIL: %s %0d generation reports", name, seen); end
    if (n != int'(gen_best_fitness)) begin failures++; $display("FAIL: %s model %0d, hardware %0d", name, n, gen_best_fitness); end
    if (int'(w) != int'(gen_best_fitness)) begin failures++; $display("FAIL: %s stored fitness %0d", name, w); end
  endtask

  int adder_gens = 600, fsm_gens = 300;
  int wdog = 80_000_000;

  initial begin
    void'($value$plusargs("ADDER_GENS=%d", adder_gens));
    void'($value$plusargs("FSM_GENS=%d", fsm_gens));
    repeat (3) @(negedge clk);
    rst_n = 1;
    adder_vectors(vecs);
    evolve("adder", adder_gens);
    fsm_vectors(vecs);
    evolve("fsm", fsm_gens);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($value$plusargs("WDOG=%d", wdog));
    repeat (wdog) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
