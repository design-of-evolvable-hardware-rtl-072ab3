// tb_ehw_fitness_unit: loads random configurations, runs the 3-bit adder
// vectors, the state-machine vectors and random vectors, and compares the
// fitness with the reference model's score. Checks the latency
// (done 2 + count*SETTLE clocks after start), busy, and that an all-zero
// mask scores every vector.
module tb_ehw_fitness_unit;
  import gap_pkg::*;
  import ehw_model_pkg::*;
  localparam int SETTLE = 12;
  logic clk = 0, rst_n = 0, clear = 0, load = 0, start = 0, busy, done;
  logic [3:0] word_idx = 0;
  word_t word = 0;
  fit_t fitness;
  logic vec_we = 0;
  logic [5:0] vec_waddr = 0;
  logic [71:0] vec_wdata = 0;
  logic [6:0] vec_count = 0;
  logic [23:0] edge_out;
  always #5 clk = !clk;

  ehw_fitness_unit #(.ROWS(6), .COLS(6), .DEPTH(64), .SETTLE(SETTLE)) dut (.*);

  int checks = 0, failures = 0;
  ehw_model m = new();
  logic [71:0] vecs[$];

  task automatic put_vectors();
    foreach (vecs[k]) begin
      vec_we = 1; vec_waddr = 6'(k); vec_wdata = vecs[k];
      @(negedge clk);
    end
    vec_we = 0;
    vec_count = 7'(vecs.size());
  endtask

  task automatic evaluate(cfg_t cfg, string name);
    int lat = 0, expf;
    for (int k = 0; k < 9; k++) begin
      load = 1; word_idx = 4'(k); word = cfg[32*k +: 32];
      @(negedge clk);
    end
    load = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    checks++;
    if (!busy) begin failures++; $display("FAIL: %s busy low after start", name); end
    while (!done && lat < 5000) begin @(negedge clk); lat++; end
    expf = m.score(cfg, vecs, SETTLE);
    checks += 2;
    if (int'(fitness) != expf) begin failures++; $display("FAIL: %s fitness %0d model %0d", name, fitness, expf); end
    if (lat != 2 + vecs.size() * SETTLE) begin failures++; $display("FAIL: %s latency %0d", name, lat); end
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
  endtask

  initial begin
    cfg_t cfg;
    int hist_nonzero = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    adder_vectors(vecs);
    put_vectors();
    for (int t = 0; t < 12; t++) begin
      for (int k = 0; k < 9; k++) cfg[32*k +: 32] = $urandom;
      evaluate(cfg, "adder");
      if (fitness != 0) hist_nonzero++;
    end
    fsm_vectors(vecs);
    put_vectors();
    for (int t = 0; t < 12; t++) begin
      for (int k = 0; k < 9; k++) cfg[32*k +: 32] = $urandom;
      evaluate(cfg, "fsm");
    end
    vecs.delete();
    for (int k = 0; k < 20; k++) vecs.push_back({24'($urandom) & 24'h0f0f0f, 24'($urandom), 24'($urandom)});
    put_vectors();
    for (int t = 0; t < 10; t++) begin
      for (int k = 0; k < 9; k++) cfg[32*k +: 32] = $urandom;
      evaluate(cfg, "random");
    end
    // nothing compared: every vector matches
    vecs.delete();
    for (int k = 0; k < 10; k++) vecs.push_back({24'h0, 24'($urandom), 24'($urandom)});
    put_vectors();
    evaluate(cfg, "nomask");
    checks++;
    if (fitness != 10) begin failures++; $display("FAIL: unmasked fitness %0d", fitness); end
    checks++;
    if (hist_nonzero == 0) begin failures++; $display("FAIL: every adder score was zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
