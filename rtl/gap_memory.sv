// gap_memory: dual-port population memory, 32-bit words.
//
// Each port reads or writes one word per clock; the two parents are read in
// the same cycle through ports A and B, and the two children are written in
// the same cycle through the same ports. An address is {bank, main address,
// sub address}: the main address selects the individual, the sub address the
// word within it, and the top sub address holds the individual's fitness.
// The array is not reset (it is an FPGA block RAM).
//
// Timing: synchronous read, data one clock after the address; a write takes
// effect at the clock edge. The ports must not write the same address in
// one cycle.
module gap_memory
  import gap_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  word_t         wdata_a,
  output word_t         rdata_a,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  word_t         wdata_b,
  output word_t         rdata_b
);
  word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    rdata_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    if (we_b) mem[addr_b] <= wdata_b;
    rdata_b <= mem[addr_b];
  end

  no_write_clash: assert property (@(posedge clk) !(we_a && we_b && addr_a == addr_b));
endmodule
