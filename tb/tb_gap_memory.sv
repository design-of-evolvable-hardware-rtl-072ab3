// tb_gap_memory: random writes through both ports to different addresses
// and random reads, compared with a reference array; read data must appear
// one clock after the address.
module tb_gap_memory;
  import gap_pkg::*;
  logic clk = 0;
  logic we_a = 0, we_b = 0;
  logic [11:0] addr_a = 0, addr_b = 0;
  word_t wdata_a = 0, wdata_b = 0, rdata_a, rdata_b;
  always #5 clk = !clk;

  gap_memory #(.AW(12)) dut (.*);

  int checks = 0, failures = 0;
  word_t ref_mem [4096];
  bit    known   [4096];

  initial begin
    // fill
    for (int i = 0; i < 4096; i += 2) begin
      @(negedge clk);
      we_a = 1; we_b = 1; addr_a = 12'(i); addr_b = 12'(i + 1);
      wdata_a = $urandom; wdata_b = $urandom;
      ref_mem[i] = wdata_a; ref_mem[i+1] = wdata_b;
    end
    @(negedge clk);
    we_a = 0; we_b = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [11:0] ra, rb;
      bit wa;
      ra = 12'($urandom); rb = 12'($urandom);
      wa = $urandom_range(0, 1);
      addr_a = ra; addr_b = rb; we_a = wa && (ra != rb); wdata_a = $urandom;
      @(negedge clk);
      checks += 2;
      if (rdata_a !== ref_mem[ra]) begin failures++; $display("FAIL: A[%0d] %h exp %h", ra, rdata_a, ref_mem[ra]); end
      if (rdata_b !== ref_mem[rb]) begin failures++; $display("FAIL: B[%0d] %h exp %h", rb, rdata_b, ref_mem[rb]); end
      if (we_a) ref_mem[ra] = wdata_a;
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
