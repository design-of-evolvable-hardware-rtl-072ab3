// tb_ehw_array: loads random 288-bit configurations as nine 32-bit words,
// drives random edge inputs, and compares the 24 edge outputs every clock
// with the reference model of the grid. Also checks a hand-made
// configuration: every cell buffers top-to-bottom, so top input c appears
// at bottom output c after six clocks.
module tb_ehw_array;
  import gap_pkg::*;
  import ehw_model_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, cfg_we = 0;
  logic [3:0] cfg_idx = 0;
  word_t cfg_word = 0;
  logic [23:0] edge_in = 0, edge_out;
  always #5 clk = !clk;

  ehw_array #(.ROWS(6), .COLS(6)) dut (.*);

  int checks = 0, failures = 0;
  ehw_model m = new();

  task automatic load(cfg_t cfg);
    for (int k = 0; k < 9; k++) begin
      cfg_we = 1; cfg_idx = 4'(k); cfg_word = cfg[32*k +: 32];
      @(negedge clk);
    end
    cfg_we = 0;
  endtask

  initial begin
    cfg_t cfg;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      for (int k = 0; k < 9; k++) cfg[32*k +: 32] = $urandom;
      load(cfg);
      clr = 1;
      @(negedge clk);
      clr = 0;
      m.clear();
      for (int c = 0; c < 40; c++) begin
        edge_in = 24'($urandom);
        #1;
        checks++;
        if (edge_out !== m.outs()) begin failures++; $display("FAIL: trial %0d clk %0d out %h exp %h", trial, c, edge_out, m.outs()); end
        m.step(cfg, edge_in);
        @(negedge clk);
      end
    end
    // every output field = BUFFER (11): down carries the top input downwards
    cfg = '1;
    load(cfg);
    edge_in = 24'h00002d;  // top inputs 0..5
    repeat (6) @(negedge clk);
    checks++;
    if (edge_out[17:12] !== 6'h2d) begin failures++; $display("FAIL: buffer column %h", edge_out[17:12]); end
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
