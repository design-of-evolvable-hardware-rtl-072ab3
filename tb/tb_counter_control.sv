// tb_counter_control: drives the counter control unit through a sequence
// with a repeated step and an externally stalled step, and compares every
// output each clock with a cycle-by-cycle expectation:
//   time 0 repeated R times: less high for R clocks, time held, then time
//   advances; t(1..3) are less delayed by 1..3 clocks; time 4 is held while
//   time_stop is high.
module tb_counter_control;
  logic clk = 0, rst_n = 0, run = 0, time_clr = 0, time_stop = 0, rep_en;
  logic [4:0] repeat_times = 5'd5;
  logic [3:0] time_q, t;
  logic less;
  logic [4:0] bit_count;
  always #5 clk = !clk;

  counter_control dut (.*);

  // repeated steps are 0 and 6; time 4 stalls for 7 clocks
  assign rep_en = (time_q == 4'd0) || (time_q == 4'd6);

  int checks = 0, failures = 0;
  int stall_left;
  logic [3:0] exp_time;
  logic [3:0] less_hist;
  int exp_bits;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run = 1;
    exp_time = 0; exp_bits = 0; less_hist = 0; stall_left = 7;
    for (int cyc = 0; cyc < 60; cyc++) begin
      logic exp_less;
      // stall input for time 4
      time_stop = (time_q == 4'd4) && (stall_left > 0);
      #1;
      exp_less = ((exp_time == 0) || (exp_time == 6)) && (exp_bits < 5);
      checks += 3;
      if (time_q != exp_time) begin failures++; $display("FAIL: cyc %0d time %0d exp %0d", cyc, time_q, exp_time); end
      if (less != exp_less) begin failures++; $display("FAIL: cyc %0d less %0b exp %0b", cyc, less, exp_less); end
      if (t != {less_hist[2:0], exp_less}) begin failures++; $display("FAIL: cyc %0d t %b exp %b", cyc, t, {less_hist[2:0], exp_less}); end
      // expected next state
      less_hist = {less_hist[2:0], exp_less};
      if (exp_less) exp_bits++;
      else if (!time_stop) begin exp_time++; exp_bits = 0; end
      if (time_q == 4'd4 && stall_left > 0) stall_left--;
      @(negedge clk);
    end
    // clear returns to time 0
    time_clr = 1;
    @(negedge clk);
    time_clr = 0;
    checks++;
    if (time_q != 0 || bit_count != 0) begin failures++; $display("FAIL: clear"); end
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
