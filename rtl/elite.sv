// elite: remembers the fittest individual by fitness and address only.
//
// Storing whole chromosomes would cost memory for long strings, so the unit
// keeps just the fitness and the main address (individual index) of the best
// individual. Two copies are kept: the running best of the generation now
// being written (cur_*), updated on every upd pulse when the new fitness is
// strictly higher, and the best of the last completed generation (best_*),
// copied from the running best on commit, after which the running best is
// cleared. The parents of the next generation are chosen using best_addr.
// Keeping the earlier individual on ties and the commit/clear protocol are
// this design's choices.
//
// Timing: registers update on the clock edge of upd / commit. If both are
// high in one cycle, the update is included in the committed value.
module elite
  import gap_pkg::*;
#(
  parameter int unsigned ADDR_W = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              upd,
  input  fit_t              fitness,
  input  logic [ADDR_W-1:0] addr,
  input  logic              commit,
  output fit_t              cur_fitness,
  output logic [ADDR_W-1:0] cur_addr,
  output logic              cur_valid,
  output fit_t              best_fitness,
  output logic [ADDR_W-1:0] best_addr
);
  logic better;
  fit_t              nxt_fit;
  logic [ADDR_W-1:0] nxt_addr;

  assign better   = upd && (!cur_valid || fitness > cur_fitness);
  assign nxt_fit  = better ? fitness : cur_fitness;
  assign nxt_addr = better ? addr    : cur_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_fitness  <= '0;
      cur_addr     <= '0;
      cur_valid    <= 1'b0;
      best_fitness <= '0;
      best_addr    <= '0;
    end else if (commit) begin
      best_fitness <= nxt_fit;
      best_addr    <= nxt_addr;
      cur_fitness  <= '0;
      cur_addr     <= '0;
      cur_valid    <= 1'b0;
    end else if (better) begin
      cur_fitness  <= fitness;
      cur_addr     <= addr;
      cur_valid    <= 1'b1;
    end
  end
endmodule
