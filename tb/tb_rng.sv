// tb_rng: checks the generator against the recurrence R' = A*R + B mod 2**32,
// computed here in 64-bit arithmetic, and checks seeding from the clock
// counter (the value loaded equals the number of clocks since reset).
module tb_rng;
  logic clk = 0, rst_n = 0, seed_ld = 0;
  logic [31:0] rnd;
  always #5 clk = !clk;

  rng #(.A(32'd1664525), .B(32'd1013904223)) dut (.*);

  int checks = 0, failures = 0;
  longint unsigned r;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (37) @(negedge clk);
    seed_ld = 1;
    @(negedge clk);
    seed_ld = 0;
    checks++;
    if (rnd != 32'd37) begin failures++; $display("FAIL: seed %0d, expected 37", rnd); end
    r = 37;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      r = (64'd1664525 * r + 64'd1013904223) % 64'h1_0000_0000;
      checks++;
      if (rnd != r[31:0]) begin failures++; $display("FAIL: step %0d got %h expected %h", i, rnd, r[31:0]); end
    end
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
