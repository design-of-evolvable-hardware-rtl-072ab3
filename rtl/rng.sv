// rng: linear congruential random number generator, R(i+1) = (A*R(i) + B) mod M.
//
// A free-running cycle counter runs from reset; a pulse on seed_ld copies its
// value into R, so the sequence depends on when the run was started. After
// that R advances every clock. M is 2**32 (the natural wrap of a 32-bit
// register); A and B are parameters, so several generators with different
// constants can run side by side. The recurrence is the processor's; the
// constant values and M are this design's choice. The low bits of an LCG
// modulo a power of two are weak, so users should take the high bits.
//
// Timing: rnd is the registered state; it changes on every clock edge.
module rng #(
  parameter logic [31:0] A = 32'd1664525,
  parameter logic [31:0] B = 32'd1013904223
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_ld,   // copy the clock counter into R
  output logic [31:0] rnd
);
  logic [31:0] clk_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_count <= '0;
      rnd       <= 32'h1;
    end else begin
      clk_count <= clk_count + 32'd1;
      if (seed_ld) rnd <= clk_count;
      else         rnd <= A * rnd + B;
    end
  end
endmodule
