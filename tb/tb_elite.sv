// tb_elite: random fitness updates with commits at random points; a
// reference keeps the maximum (first of equals) and its address.
module tb_elite;
  import gap_pkg::*;
  logic clk = 0, rst_n = 0, upd = 0, commit = 0, cur_valid;
  fit_t fitness = 0, cur_fitness, best_fitness;
  logic [6:0] addr = 0, cur_addr, best_addr;
  always #5 clk = !clk;

  elite #(.ADDR_W(7)) dut (.*);

  int checks = 0, failures = 0;
  int ref_f = -1, ref_a = 0, ref_bf = 0, ref_ba = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      upd = ($urandom_range(0, 3) != 0);
      commit = ($urandom_range(0, 19) == 0);
      fitness = fit_t'($urandom_range(0, 64));
      addr = 7'($urandom_range(0, 99));
      if (upd && int'(fitness) > ref_f) begin ref_f = fitness; ref_a = addr; end
      if (commit) begin ref_bf = (ref_f < 0) ? 0 : ref_f; ref_ba = (ref_f < 0) ? 0 : ref_a; ref_f = -1; ref_a = 0; end
      @(negedge clk);
      checks += 2;
      if (int'(best_fitness) != ref_bf || int'(best_addr) != ref_ba) begin
        failures++; $display("FAIL: best %0d@%0d exp %0d@%0d", best_fitness, best_addr, ref_bf, ref_ba);
      end
      if (cur_valid != (ref_f >= 0) || (ref_f >= 0 && (int'(cur_fitness) != ref_f || int'(cur_addr) != ref_a))) begin
        failures++; $display("FAIL: running best %0d@%0d exp %0d@%0d", cur_fitness, cur_addr, ref_f, ref_a);
      end
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
