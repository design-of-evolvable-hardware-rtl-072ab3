// tb_onemax_fitness: random chromosomes of 1..9 words; the fitness must be
// the popcount worked out here, with done n_words + 2 clocks after start.
module tb_onemax_fitness;
  import gap_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, start = 0, busy, done;
  logic [3:0] word_idx = 0, n_words = 1;
  word_t word = 0;
  fit_t fitness;
  always #5 clk = !clk;

  onemax_fitness #(.MAX_WORDS(9)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int n, lat, w;
      n = 0; lat = 0;
      w = $urandom_range(1, 9);
      if (t == 0) w = 9;
      n_words = 4'(w);
      for (int k = 0; k < w; k++) begin
        load = 1; word_idx = 4'(k);
        word = (t == 0) ? '1 : $urandom;
        for (int b = 0; b < 32; b++) n += int'(word[b]);
        @(negedge clk);
      end
      load = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks += 2;
      if (int'(fitness) != n) begin failures++; $display("FAIL: fitness %0d exp %0d", fitness, n); end
      if (lat != w + 2) begin failures++; $display("FAIL: latency %0d exp %0d", lat, w + 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
