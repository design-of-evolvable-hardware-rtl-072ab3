// tb_crossover: random parent words, word indices and cut points; the
// expected children are built bit by bit from the chromosome bit index
// 32*word + bit compared with the cut. Also checks pass-through without
// crossover and the one-clock latency.
module tb_crossover;
  import gap_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, do_cross = 0, out_valid;
  word_t a = 0, b = 0, child_a, child_b;
  logic [3:0] word_idx = 0;
  logic [8:0] cut = 0;
  always #5 clk = !clk;

  crossover #(.IDX_W(4)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      word_t ea, eb;
      a = $urandom; b = $urandom;
      word_idx = 4'($urandom_range(0, 8));
      cut = 9'($urandom_range(1, 287));
      do_cross = ($urandom_range(0, 4) != 0);
      for (int j = 0; j < 32; j++) begin
        bit own;
        own = !do_cross || (word_idx * 32 + j < cut);
        ea[j] = own ? a[j] : b[j];
        eb[j] = own ? b[j] : a[j];
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks += 3;
      if (!out_valid) begin failures++; $display("FAIL: out_valid low"); end
      if (child_a !== ea) begin failures++; $display("FAIL: i=%0d child_a %h exp %h (idx %0d cut %0d)", i, child_a, ea, word_idx, cut); end
      if (child_b !== eb) begin failures++; $display("FAIL: i=%0d child_b %h exp %h", i, child_b, eb); end
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL: out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
