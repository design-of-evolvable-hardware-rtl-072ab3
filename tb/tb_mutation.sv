// tb_mutation: random words and random numbers; a bit is expected to flip
// exactly when rnd[31:16] < thresh and the lane is enabled, at position
// rnd[15:11]. Also measures the flip rate at the default threshold (1704,
// i.e. 0.026) over many words.
module tb_mutation;
  import gap_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, en_a = 1, en_b = 1, out_valid, mut_a, mut_b;
  word_t a = 0, b = 0, child_a, child_b;
  logic [31:0] rnd_a = 0, rnd_b = 0;
  logic [15:0] thresh = 16'd20000;
  always #5 clk = !clk;

  mutation dut (.*);

  int checks = 0, failures = 0, flips = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      word_t ea, eb;
      bit ha, hb;
      if (i == 1000) thresh = 16'd1704;
      a = $urandom; b = $urandom; rnd_a = $urandom; rnd_b = $urandom;
      en_a = ($urandom_range(0, 3) != 0); en_b = ($urandom_range(0, 3) != 0);
      ha = en_a && rnd_a[31:16] < thresh;
      hb = en_b && rnd_b[31:16] < thresh;
      ea = a; eb = b;
      if (ha) ea[rnd_a[15:11]] = !ea[rnd_a[15:11]];
      if (hb) eb[rnd_b[15:11]] = !eb[rnd_b[15:11]];
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks += 3;
      if (child_a !== ea || mut_a !== ha) begin failures++; $display("FAIL: lane a %h exp %h", child_a, ea); end
      if (child_b !== eb || mut_b !== hb) begin failures++; $display("FAIL: lane b %h exp %h", child_b, eb); end
      if (!out_valid) begin failures++; $display("FAIL: out_valid"); end
      if (i >= 1000 && en_a && mut_a) flips++;
    end
    // about 3000*0.75*0.026 = 58 expected
    checks++;
    if (flips < 25 || flips > 110) begin failures++; $display("FAIL: %0d flips at rate 0.026", flips); end
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
