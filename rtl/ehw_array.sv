// ehw_array: the evolvable-hardware module, a ROWS x COLS grid of ehw_cell.
//
// Each cell talks to its four neighbours; the wires on the outer edge of the
// grid are the array's inputs and outputs, 2*(ROWS+COLS) of each (24 for the
// 6x6 array). Edge index: 0..COLS-1 along the top (left to right), then
// ROWS along the right side (top to bottom), COLS along the bottom (left to
// right), ROWS along the left side (top to bottom).
//
// The configuration (8 bits per cell, 288 bits for 6x6) is written 32 bits at
// a time: cfg_we stores cfg_word as word cfg_idx, so the 6x6 array needs 9
// writes. Cell (r,c) uses configuration bits 8*(r*COLS+c) +: 8. The grid
// size, 8 bits per cell, the 24 edge signals and the 9 word loads follow the
// processor; the edge and bit ordering are this design's choice.
//
// Timing: a configuration word is stored at the clock edge; cell outputs are
// registered (one clock per cell crossed). clr clears all cell outputs.
module ehw_array
  import gap_pkg::*;
#(
  parameter int unsigned ROWS = 6,
  parameter int unsigned COLS = 6,
  localparam int unsigned EDGE   = 2 * (ROWS + COLS),
  localparam int unsigned CFG_W  = 8 * ROWS * COLS,
  localparam int unsigned NWORDS = (CFG_W + WORD_W - 1) / WORD_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr,
  input  logic                      cfg_we,
  input  logic [$clog2(NWORDS)-1:0] cfg_idx,
  input  word_t                     cfg_word,
  input  logic [EDGE-1:0]           edge_in,
  output logic [EDGE-1:0]           edge_out
);
  // configuration register
  logic [NWORDS*WORD_W-1:0] cfg;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 cfg <= '0;
    else if (cfg_we && 32'(cfg_idx) < NWORDS)   cfg[cfg_idx*WORD_W +: WORD_W] <= cfg_word;
  end

  // cell outputs
  logic o_up [ROWS][COLS];
  logic o_dn [ROWS][COLS];
  logic o_lf [ROWS][COLS];
  logic o_rt [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic i_up, i_dn, i_lf, i_rt;
      if (r == 0) begin : g_up_edge assign i_up = edge_in[c]; end
      else begin : g_up_cell assign i_up = o_dn[r-1][c]; end
      if (r == ROWS-1) begin : g_dn_edge assign i_dn = edge_in[COLS + ROWS + c]; end
      else begin : g_dn_cell assign i_dn = o_up[r+1][c]; end
      if (c == 0) begin : g_lf_edge assign i_lf = edge_in[2*COLS + ROWS + r]; end
      else begin : g_lf_cell assign i_lf = o_rt[r][c-1]; end
      if (c == COLS-1) begin : g_rt_edge assign i_rt = edge_in[COLS + r]; end
      else begin : g_rt_cell assign i_rt = o_lf[r][c+1]; end

      ehw_cell u_cell (
        .clk      (clk),
        .clr      (clr),
        .cfg      (cfg[8*(r*COLS+c) +: 8]),
        .in_up    (i_up),
        .in_down  (i_dn),
        .in_left  (i_lf),
        .in_right (i_rt),
        .out_up   (o_up[r][c]),
        .out_down (o_dn[r][c]),
        .out_left (o_lf[r][c]),
        .out_right(o_rt[r][c])
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_tb_edge
    assign edge_out[c]               = o_up[0][c];
    assign edge_out[COLS + ROWS + c] = o_dn[ROWS-1][c];
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_lr_edge
    assign edge_out[COLS + r]            = o_rt[r][COLS-1];
    assign edge_out[2*COLS + ROWS + r]   = o_lf[r][0];
  end
endmodule
