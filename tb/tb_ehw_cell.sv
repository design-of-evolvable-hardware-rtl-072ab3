// tb_ehw_cell: random configurations and inputs; each output is compared one
// clock later with the function table (00 AND of all four inputs, 01 OR,
// 10 NOT of the opposite input, 11 the opposite input). Also checks clr.
module tb_ehw_cell;
  logic clk = 0, clr = 0;
  logic [7:0] cfg = 0;
  logic in_up = 0, in_down = 0, in_left = 0, in_right = 0;
  logic out_up, out_down, out_left, out_right;
  always #5 clk = !clk;

  ehw_cell dut (.*);

  int checks = 0, failures = 0;

  function automatic bit f(bit [1:0] s, bit opp, bit [3:0] ins);
    case (s)
      2'b00: return &ins;
      2'b01: return |ins;
      2'b10: return !opp;
      default: return opp;
    endcase
  endfunction

  initial begin
    clr = 1;
    @(negedge clk);
    clr = 0;
    checks++;
    if ({out_up, out_down, out_left, out_right} != 0) begin failures++; $display("FAIL: clr"); end
    for (int i = 0; i < 2000; i++) begin
      bit [3:0] ins;
      bit eu, ed, el, er;
      cfg = 8'($urandom);
      {in_up, in_down, in_left, in_right} = 4'($urandom);
      ins = {in_up, in_down, in_left, in_right};
      eu = f(cfg[1:0], in_down, ins);
      ed = f(cfg[3:2], in_up, ins);
      el = f(cfg[5:4], in_right, ins);
      er = f(cfg[7:6], in_left, ins);
      @(negedge clk);
      checks += 4;
      if (out_up != eu)    begin failures++; $display("FAIL: up cfg %b", cfg); end
      if (out_down != ed)  begin failures++; $display("FAIL: down cfg %b", cfg); end
      if (out_left != el)  begin failures++; $display("FAIL: left cfg %b", cfg); end
      if (out_right != er) begin failures++; $display("FAIL: right cfg %b", cfg); end
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
