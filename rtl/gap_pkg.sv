// gap_pkg: constants and types shared by the genetic algorithm processor (GAP)
// and the evolvable-hardware (EHW) fitness unit.
//
// The GAP moves chromosomes as a stream of 32-bit words; fitness values are
// 16-bit counts. Rates are 16-bit fractions of 65536 and are compared with
// 16 random bits (rate 0.8 -> 52429, rate 0.026 -> 1704). The controller time
// steps follow the two control sequences of the processor: an initial
// "generation" sequence (time 0..2) and a "reproduction" sequence (time 0..8).
package gap_pkg;

  localparam int unsigned WORD_W = 32;   // data bus width
  localparam int unsigned FIT_W  = 16;   // fitness width

  // Default operator rates as 16-bit thresholds.
  localparam logic [15:0] CROSS_THRESH_DEFAULT = 16'd52429; // 0.8
  localparam logic [15:0] MUT_THRESH_DEFAULT   = 16'd1704;  // 0.026

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [FIT_W-1:0]  fit_t;

  // Operating mode of the controller.
  typedef enum logic [1:0] {
    MODE_IDLE  = 2'd0,
    MODE_GEN   = 2'd1,   // initial population: random words, evaluate, store
    MODE_REPRO = 2'd2    // reproduction: read, cross, mutate, evaluate, store
  } mode_e;

  // Time steps of the reproduction sequence (generation uses 0..2).
  localparam logic [3:0] T_READ    = 4'd0; // read parents (repeated per word)
  localparam logic [3:0] T_EVAL_A  = 4'd4; // evaluate child a
  localparam logic [3:0] T_STORE_A = 4'd5; // store fitness of child a
  localparam logic [3:0] T_WRITE   = 4'd6; // write children, load child b (repeated)
  localparam logic [3:0] T_EVAL_B  = 4'd7; // evaluate child b
  localparam logic [3:0] T_STORE_B = 4'd8; // store fitness of child b

  localparam logic [3:0] G_LOAD  = 4'd0;   // random word to memory and EHW (repeated)
  localparam logic [3:0] G_EVAL  = 4'd1;   // evaluate
  localparam logic [3:0] G_STORE = 4'd2;   // store fitness

endpackage
