// gap_controller: sequencer of the genetic algorithm processor.
//
// Two control sequences are run, each as a series of time steps counted by
// the counter control unit; steps that handle a chromosome word by word are
// repeated chrom_words times (one repetition per 32-bit word).
//
// Generation (initial population), for each individual i:
//   time 0 (repeated)  a random word is written to memory word {cur, i, k}
//                      and loaded into the fitness evaluator as word k
//   time 1             the evaluator runs; time is held until fe_done
//   time 2             the fitness is written to {cur, i, FIT_SUB}, the
//                      elite module is updated, the evaluator is cleared
// Reproduction, for each pair of children (i, i+1) of the next generation:
//   t(0) (repeated)    parent words k read through both memory ports
//   t(1)               crossover of word k
//   t(2)               mutation of word k
//   t(3)               both children's word k pushed into the FIFOs; child a
//                      loaded into the evaluator
//   time 4             child a evaluated (held until fe_done)
//   time 5             fitness a written to {nxt, i, FIT_SUB}; elite update
//   time 6 (repeated)  both FIFOs popped; child a written to {nxt, i, k}
//                      (port A), child b to {nxt, i+1, k} (port B) and
//                      loaded into the evaluator
//   time 7             child b evaluated
//   time 8             fitness b written to {nxt, i+1, FIT_SUB}; elite update
// t(1)..t(3) are t(0) delayed by the counter control unit, so the word
// stream is pipelined: word k+1 is read while word k is crossed.
// After the last pair the elite is committed, the banks swap, and the
// generation counter advances; the run ends after max_gen generations.
//
// The two sequences, their steps and the repeat mechanism are the
// processor's. This design's own choices: parent a is the elite of the
// previous generation and parent b a random individual; the first child of
// every generation is an exact copy of the elite (no crossover, no mutation);
// one-point crossover with probability CROSS_THRESH/65536; two population
// banks; the fitness kept in the top word of each individual's slot.
module gap_controller
  import gap_pkg::*;
#(
  parameter int unsigned POP_SIZE     = 100,
  parameter int unsigned SUB_W        = 4,
  parameter logic [15:0] CROSS_THRESH = CROSS_THRESH_DEFAULT,
  localparam int unsigned MAIN_W = $clog2(POP_SIZE),
  localparam int unsigned AW     = 1 + MAIN_W + SUB_W,
  localparam int unsigned CUT_W  = SUB_W + 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // run control
  input  logic              start,
  input  logic [SUB_W-1:0]  chrom_words,
  input  logic [15:0]       max_gen,
  output logic              busy,
  output logic              done,
  output logic              gen_done,
  output logic [15:0]       generation,
  output mode_e             mode,
  output logic [3:0]        time_step,
  output logic              cur_bank,    // bank holding the current population
  // random numbers
  output logic              seed_ld,
  input  logic [31:0]       rnd_sel,
  input  logic [31:0]       rnd_cross,
  // population memory
  output logic              we_a,
  output logic [AW-1:0]     addr_a,
  output logic              we_b,
  output logic [AW-1:0]     addr_b,
  output logic              wsel_fit,    // sel_mem: write fitness, not a word
  output logic              wsel_rand,   // port A writes the random word
  // crossover and mutation
  output logic              cross_in,
  output logic [SUB_W-1:0]  cross_idx,
  output logic [CUT_W-1:0]  cut,
  output logic              do_cross,
  output logic              mutation_in,
  output logic              mut_en_a,
  // child FIFOs
  output logic              fifo_in,
  output logic              fifo_out,
  output logic              fifo_clr,
  // fitness evaluator
  output logic              fe_load,
  output logic [SUB_W-1:0]  fe_word_idx,
  output logic [1:0]        sel_chrom,   // 0 random, 1 child a, 2 child b
  output logic              fe_start,
  output logic              fe_clear,
  input  logic              fe_done,
  // elite
  output logic              elite_upd,
  output logic [MAIN_W-1:0] elite_addr,
  output logic              elite_commit,
  input  logic [MAIN_W-1:0] elite_best_addr
);
  localparam logic [SUB_W-1:0] FIT_SUB = '1;

  logic              bank;          // bank holding the current population
  logic [MAIN_W-1:0] ind;           // individual / first child of the pair
  logic [MAIN_W-1:0] pb;            // random parent
  logic [15:0]       gen_q;
  logic              eval_issued;
  logic              do_cross_q;    // crossover drawn for this pair
  logic [SUB_W-1:0]  s1, s2, s3;    // word index delayed with t(1..3)

  // counter control unit
  logic       run, time_clr, time_stop, rep_en, less;
  logic [3:0] t;
  logic [SUB_W:0] bit_count;

  counter_control #(.CNT_W(SUB_W+1)) u_cc (
    .clk(clk), .rst_n(rst_n), .run(run), .time_clr(time_clr),
    .time_stop(time_stop), .rep_en(rep_en), .repeat_times({1'b0, chrom_words}),
    .time_q(time_step), .less(less), .t(t), .bit_count(bit_count)
  );

  logic gen_mode, rep_mode, eval_step, store_step, last_ind, last_gen;
  assign gen_mode  = (mode == MODE_GEN);
  assign rep_mode  = (mode == MODE_REPRO);
  assign run       = gen_mode || rep_mode;
  assign rep_en    = (gen_mode && time_step == G_LOAD) ||
                     (rep_mode && (time_step == T_READ || time_step == T_WRITE));
  assign eval_step = (gen_mode && time_step == G_EVAL) ||
                     (rep_mode && (time_step == T_EVAL_A || time_step == T_EVAL_B));
  assign store_step = (gen_mode && time_step == G_STORE) ||
                      (rep_mode && (time_step == T_STORE_A || time_step == T_STORE_B));
  assign time_stop = eval_step && !fe_done;
  assign last_ind  = gen_mode ? (ind == MAIN_W'(POP_SIZE-1)) : (ind >= MAIN_W'(POP_SIZE-2));
  assign last_gen  = (gen_q + 16'd1 >= max_gen);

  // the end of a generation sequence step or of a reproduction pair
  logic seq_end;
  assign seq_end  = (gen_mode && time_step == G_STORE) || (rep_mode && time_step == T_STORE_B);
  assign time_clr = seq_end;

  // elite copy: first pair of a reproduction generation
  logic elite_copy;
  assign elite_copy = (ind == '0);

  // random picks for the next pair
  logic [MAIN_W-1:0]  pb_next;
  logic [CUT_W-1:0]   cut_next;
  logic [CUT_W+15:0]  cut_prod;
  logic [MAIN_W+15:0] pb_prod;
  assign pb_prod  = rnd_sel[31:16] * (MAIN_W+16)'(POP_SIZE);
  assign pb_next  = pb_prod[MAIN_W+15:16];
  assign cut_prod = rnd_sel[15:0] * (CUT_W+16)'({chrom_words, 5'd0} - 1'b1);
  assign cut_next = cut_prod[CUT_W+15:16] + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode        <= MODE_IDLE;
      bank        <= 1'b0;
      ind         <= '0;
      pb          <= '0;
      cut         <= '0;
      do_cross_q  <= 1'b0;
      gen_q       <= '0;
      eval_issued <= 1'b0;
      s1 <= '0; s2 <= '0; s3 <= '0;
    end else begin
      s1 <= bit_count[SUB_W-1:0];
      s2 <= s1;
      s3 <= s2;
      if (fe_start)     eval_issued <= 1'b1;
      else if (fe_done) eval_issued <= 1'b0;

      unique case (mode)
        MODE_IDLE: if (start) begin
          mode  <= MODE_GEN;
          ind   <= '0;
          gen_q <= '0;
        end
        MODE_GEN: if (seq_end) begin
          if (last_ind) begin
            ind <= '0;
            if (max_gen == 16'd0) mode <= MODE_IDLE;
            else                  mode <= MODE_REPRO;
          end else begin
            ind <= ind + 1'b1;
          end
        end
        MODE_REPRO: if (seq_end) begin
          if (last_ind) begin
            ind   <= '0;
            bank  <= !bank;
            gen_q <= gen_q + 16'd1;
            if (last_gen) mode <= MODE_IDLE;
          end else begin
            ind <= ind + MAIN_W'(2);
          end
        end
        default: mode <= MODE_IDLE;
      endcase

      // parent b, cut point and crossover decision for the next pair
      if (seq_end) begin
        pb       <= pb_next;
        cut      <= cut_next;
        do_cross_q <= (rnd_cross[31:16] < CROSS_THRESH);
      end
    end
  end

  // outputs
  assign busy       = run;
  assign generation = gen_q;
  assign cur_bank   = bank;
  assign seed_ld    = start && (mode == MODE_IDLE);
  assign done       = seq_end && last_ind && ((gen_mode && max_gen == 16'd0) || (rep_mode && last_gen));
  assign gen_done   = seq_end && last_ind;

  logic nxt;
  assign nxt = !bank;

  always_comb begin
    we_a      = 1'b0;
    we_b      = 1'b0;
    addr_a    = '0;
    addr_b    = '0;
    wsel_fit  = 1'b0;
    wsel_rand = 1'b0;
    if (gen_mode) begin
      if (time_step == G_LOAD && less) begin
        we_a      = 1'b1;
        wsel_rand = 1'b1;
        addr_a    = {bank, ind, bit_count[SUB_W-1:0]};
      end else if (time_step == G_STORE) begin
        we_a     = 1'b1;
        wsel_fit = 1'b1;
        addr_a   = {bank, ind, FIT_SUB};
      end
    end else if (rep_mode) begin
      if (time_step == T_READ && less) begin
        addr_a = {bank, elite_best_addr, bit_count[SUB_W-1:0]};
        addr_b = {bank, pb, bit_count[SUB_W-1:0]};
      end else if (time_step == T_STORE_A) begin
        we_a     = 1'b1;
        wsel_fit = 1'b1;
        addr_a   = {nxt, ind, FIT_SUB};
      end else if (time_step == T_WRITE && less) begin
        we_a   = 1'b1;
        we_b   = 1'b1;
        addr_a = {nxt, ind, bit_count[SUB_W-1:0]};
        addr_b = {nxt, ind + 1'b1, bit_count[SUB_W-1:0]};
      end else if (time_step == T_STORE_B) begin
        we_b     = 1'b1;
        wsel_fit = 1'b1;
        addr_b   = {nxt, ind + 1'b1, FIT_SUB};
      end
    end
  end

  // t(1..3) also follow the repetitions of time 6; only those that trail
  // time 0 (read) belong to the read pipeline
  logic rd_pipe;
  assign rd_pipe     = rep_mode && time_step < T_EVAL_A;
  assign cross_in    = rd_pipe && t[1];
  assign cross_idx   = s1;
  assign do_cross    = do_cross_q && !elite_copy;
  assign mutation_in = rd_pipe && t[2];
  assign mut_en_a    = !elite_copy;
  assign fifo_in     = rd_pipe && t[3];
  assign fifo_out    = rep_mode && time_step == T_WRITE && less;
  assign fifo_clr    = seed_ld;

  always_comb begin
    fe_load     = 1'b0;
    fe_word_idx = '0;
    sel_chrom   = 2'd0;
    if (gen_mode && time_step == G_LOAD && less) begin
      fe_load     = 1'b1;
      fe_word_idx = bit_count[SUB_W-1:0];
      sel_chrom   = 2'd0;
    end else if (rd_pipe && t[3]) begin
      fe_load     = 1'b1;
      fe_word_idx = s3;
      sel_chrom   = 2'd1;
    end else if (rep_mode && time_step == T_WRITE && less) begin
      fe_load     = 1'b1;
      fe_word_idx = bit_count[SUB_W-1:0];
      sel_chrom   = 2'd2;
    end
  end

  assign fe_start     = eval_step && !eval_issued;
  assign fe_clear     = store_step;
  assign elite_upd    = store_step;
  assign elite_addr   = (rep_mode && time_step == T_STORE_B) ? ind + 1'b1 : ind;
  assign elite_commit = seq_end && last_ind;

  pop_even:        assert property (@(posedge clk) POP_SIZE % 2 == 0);
  words_fit:       assert property (@(posedge clk) disable iff (!rst_n)
                                    !run || (chrom_words != 0 && 32'(chrom_words) < 2**SUB_W));
  one_fifo_action: assert property (@(posedge clk) disable iff (!rst_n) !(fifo_in && fifo_out));
endmodule
