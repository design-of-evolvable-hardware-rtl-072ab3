// tb_eval_vector_mem: writes random entries and reads them back at random,
// checking the split into input, expected and mask fields.
module tb_eval_vector_mem;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [71:0] wdata = 0;
  logic [23:0] vec_in, vec_exp, vec_mask;
  always #5 clk = !clk;

  eval_vector_mem #(.EDGE(24), .DEPTH(64)) dut (.*);

  int checks = 0, failures = 0;
  logic [71:0] ref_mem [64];

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = {$urandom, $urandom, $urandom};
      ref_mem[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 500; i++) begin
      // read a random entry, and sometimes write another one in the same clock
      raddr = 6'($urandom);
      we = ($urandom_range(0, 3) == 0);
      waddr = 6'($urandom);
      if (waddr == raddr) we = 0;
      wdata = {$urandom, $urandom, $urandom};
      #1;
      checks++;
      if ({vec_mask, vec_exp, vec_in} !== ref_mem[raddr]) begin
        failures++;
        $display("FAIL: entry %0d %h exp %h", raddr, {vec_mask, vec_exp, vec_in}, ref_mem[raddr]);
      end
      @(negedge clk);
      if (we) ref_mem[waddr] = wdata;
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
