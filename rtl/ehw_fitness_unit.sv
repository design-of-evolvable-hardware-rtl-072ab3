// ehw_fitness_unit: scores one EHW configuration against the stored vectors.
//
// Around the EHW array sit the IO unit (drives a vector onto the edge inputs),
// the memory of evaluation vectors, a vector counter and a comparator. The
// GAP first writes the chromosome into the array's configuration register
// (load / word_idx / word, one 32-bit word per clock). A start pulse then
//   1. clears the cell flip-flops (one clock),
//   2. for each vector 0..vec_count-1: holds its input pattern on the edge
//      inputs for SETTLE clocks, then compares the masked edge outputs with
//      the masked expected pattern and counts a match,
//   3. pulses done with fitness = number of matching vectors.
// Vectors follow one another without clearing the cells, so a sequence of
// vectors can score sequential behaviour (a state machine held in the cells).
// busy stays high from the clock after start until done; the GAP uses it as
// its time-stop signal. Latency: start to done = 2 + vec_count*SETTLE clocks.
// The unit's parts and the fitness as a match count are the processor's;
// SETTLE, the mask and the clear-once policy are this design's choice.
module ehw_fitness_unit
  import gap_pkg::*;
#(
  parameter int unsigned ROWS   = 6,
  parameter int unsigned COLS   = 6,
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned SETTLE = 12,
  parameter int unsigned IDX_W  = 4,
  localparam int unsigned EDGE   = 2 * (ROWS + COLS),
  localparam int unsigned NWORDS = (8 * ROWS * COLS + WORD_W - 1) / WORD_W,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the GAP
  input  logic              clear,     // clear the cell state
  input  logic              load,      // configuration word valid
  input  logic [IDX_W-1:0]  word_idx,
  input  word_t             word,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output fit_t              fitness,
  // evaluation-vector memory, written by the host
  input  logic              vec_we,
  input  logic [AW-1:0]     vec_waddr,
  input  logic [3*EDGE-1:0] vec_wdata,
  input  logic [AW:0]       vec_count,
  // observation of the array
  output logic [EDGE-1:0]   edge_out
);
  typedef enum logic [1:0] {S_IDLE, S_CLR, S_RUN, S_DONE} state_e;
  state_e state;

  logic [AW-1:0]         vidx;
  logic [$clog2(SETTLE+1)-1:0] settle;
  logic [EDGE-1:0]       vec_in, vec_exp, vec_mask, edge_in;
  logic                  match, last_vec;

  eval_vector_mem #(.EDGE(EDGE), .DEPTH(DEPTH)) u_vmem (
    .clk(clk), .we(vec_we), .waddr(vec_waddr), .wdata(vec_wdata),
    .raddr(vidx), .vec_in(vec_in), .vec_exp(vec_exp), .vec_mask(vec_mask)
  );

  // IO unit: the current vector drives the array only while evaluating
  assign edge_in = (state == S_RUN) ? vec_in : '0;

  ehw_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk(clk), .rst_n(rst_n),
    .clr(clear || state == S_CLR),
    .cfg_we(load && state == S_IDLE),
    .cfg_idx(word_idx[$clog2(NWORDS)-1:0]),
    .cfg_word(word),
    .edge_in(edge_in), .edge_out(edge_out)
  );

  // comparator
  assign match    = ((edge_out ^ vec_exp) & vec_mask) == '0;
  assign last_vec = ({1'b0, vidx} == vec_count - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      vidx    <= '0;
      settle  <= '0;
      fitness <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_CLR;
          vidx    <= '0;
          settle  <= '0;
          fitness <= '0;
        end
        S_CLR: state <= (vec_count == 0) ? S_DONE : S_RUN;
        S_RUN: begin
          if (32'(settle) == SETTLE - 1) begin
            settle <= '0;
            if (match) fitness <= fitness + 1'b1;
            if (last_vec) state <= S_DONE;
            else          vidx  <= vidx + 1'b1;
          end else begin
            settle <= settle + 1'b1;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_CLR) || (state == S_RUN);
  assign done = (state == S_DONE);

  no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(load && busy));
endmodule
