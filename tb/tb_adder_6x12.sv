// tb_adder_6x12: the 3-bit adder experiment on the enlarged 6x12 array
// (72 cells, 576 configuration bits = 18 words per chromosome, 36 edge
// signals). a drives top inputs 0..2, b top inputs 3..5; the 4-bit sum is
// expected on bottom outputs 0..3 (edge indices 18..21). Two generations
// after the initial population. Checks that the elite never drops, that
// each generation takes POP/2 * (2W + 7 + 2*(3 + 64*SETTLE)) clocks, and
// that the elite chromosome read back from memory scores, in the reference
// model of the 6x12 grid, exactly the reported (and stored) fitness.
module tb_adder_6x12;
  import gap_pkg::*;
  import ehw_model_pkg::*;
  localparam int R = 6, C = 12, E = 2 * (R + C), W = 18, POP = 100, SETTLE = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        start = 0, problem_sel = 0;
  logic [4:0]  chrom_words = 5'(W);
  logic [15:0] max_gen = 16'd2;
  logic        vec_we = 0;
  logic [5:0]  vec_addr = 0;
  logic [3*E-1:0] vec_wdata = 0;
  logic [6:0]  vec_count = 0;
  logic [12:0] host_addr = 0;
  word_t       host_rdata;
  logic        busy, done, gen_done, cur_bank, cross_fire, mut_fire, fe_busy;
  logic [15:0] generation;
  fit_t        gen_best_fitness;
  logic [6:0]  gen_best_addr;
  logic [E-1:0] ehw_out;

  ehw_gap_top #(.ROWS(R), .COLS(C)) dut (.*);

  typedef ehw_model #(R, C) model_t;
  int checks = 0, failures = 0;
  model_t::vec_t vecs[$];

  initial begin
    int prev = -1, gens = 0;
    longint cyc = 0, t_last = -1;
    model_t::cfg_rc_t cfg;
    model_t m = new();
    word_t w;
    int n;
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        logic [E-1:0] vin, vexp, vmask;
        vin   = E'(a | (b << 3));
        vexp  = E'(a + b) << (C + R);
        vmask = E'(4'hF) << (C + R);
        vecs.push_back({vmask, vexp, vin});
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (vecs[k]) begin
      vec_we = 1; vec_addr = 6'(k); vec_wdata = vecs[k];
      @(negedge clk);
    end
    vec_we = 0;
    vec_count = 7'd64;
    start = 1;
    @(negedge clk);
    start = 0;
    while (1) begin
      @(posedge clk);
      cyc++;
      if (gen_done) begin
        @(posedge clk); cyc++;
        checks++;
        if (int'(gen_best_fitness) < prev) begin failures++; $display("FAIL: elite dropped"); end
        prev = int'(gen_best_fitness);
        if (t_last >= 0) begin
          checks++;
          if (cyc - t_last != POP / 2 * (2 * W + 7 + 2 * (3 + 64 * SETTLE))) begin
            failures++; $display("FAIL: generation took %0d clocks", cyc - t_last);
          end
        end
        t_last = cyc;
        $display("  6x12 adder generation %0d elite fitness %0d", gens, gen_best_fitness);
        gens++;
        if (!busy) break;
      end
    end
    for (int k = 0; k < W; k++) begin
      host_addr = {cur_bank, gen_best_addr, 5'(k)};
      @(posedge clk); #1;
      cfg[32*k +: 32] = host_rdata;
    end
    host_addr = {cur_bank, gen_best_addr, 5'd31};
    @(posedge clk); #1;
    w = host_rdata;
    n = m.score(cfg, vecs, SETTLE);
    checks += 3;
    if (gens != 3) begin failures++; $display("FAIL: %0d generation reports", gens); end
    if (n != int'(gen_best_fitness)) begin failures++; $display("FAIL: model %0d, hardware %0d", n, gen_best_fitness); end
    if (int'(w) != int'(gen_best_fitness)) begin failures++; $display("FAIL: stored fitness %0d", w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
