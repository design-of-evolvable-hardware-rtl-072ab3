// tb_chrom_fifo: random push/pop traffic against a queue model; checks data
// order, empty and full, and the clear input.
module tb_chrom_fifo;
  import gap_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0, empty, full;
  word_t wdata = 0, rdata;
  always #5 clk = !clk;

  chrom_fifo #(.DEPTH(16)) dut (.*);

  int checks = 0, failures = 0;
  word_t q[$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      push = ($urandom_range(0, 1) == 1) && q.size() < 16;
      pop  = ($urandom_range(0, 1) == 1) && q.size() > 0;
      if (i == 1500) begin push = 0; pop = 0; end
      clr  = (i == 1500);
      wdata = $urandom;
      #1;
      checks += 3;
      if (empty != (q.size() == 0)) begin failures++; $display("FAIL: empty"); end
      if (full != (q.size() == 16)) begin failures++; $display("FAIL: full"); end
      if (q.size() > 0 && rdata !== q[0]) begin failures++; $display("FAIL: rdata %h exp %h", rdata, q[0]); end
      @(negedge clk);
      if (clr) q.delete();
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
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
