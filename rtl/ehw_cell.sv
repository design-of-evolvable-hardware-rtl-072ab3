// ehw_cell: one component cell of the evolvable-hardware array, modelled on
// the Xilinx XC6200 cell.
//
// The cell has an input and an output on each of its four sides. Each output
// has its own 2-bit function field, so the four outputs of one cell can
// compute different logic from the same four inputs:
//   00  AND of the four inputs
//   01  OR  of the four inputs
//   10  NOT    of the input entering on the opposite side
//   11  BUFFER of the input entering on the opposite side
// cfg = {right, left, down, up}, two bits each (8 bits per cell).
// Four directions with AND/OR/NOT/BUFFER and eight configuration bits per
// cell are the processor's; the encoding and the operands of each function
// are this design's choice.
//
// Every output is registered, so signals move one cell per clock and the
// neighbour-to-neighbour loops of the array are broken by flip-flops; this
// also lets the array hold state (e.g. an evolved state machine). clr resets
// the four flip-flops synchronously.
module ehw_cell (
  input  logic       clk,
  input  logic       clr,
  input  logic [7:0] cfg,
  input  logic       in_up,     // entering from the cell above
  input  logic       in_down,   // entering from the cell below
  input  logic       in_left,   // entering from the cell on the left
  input  logic       in_right,  // entering from the cell on the right
  output logic       out_up,
  output logic       out_down,
  output logic       out_left,
  output logic       out_right
);
  logic all_and, any_or;
  assign all_and = in_up & in_down & in_left & in_right;
  assign any_or  = in_up | in_down | in_left | in_right;

  function automatic logic cell_fn(input logic [1:0] f, input logic opp,
                                   input logic a, input logic o);
    unique case (f)
      2'b00:   return a;
      2'b01:   return o;
      2'b10:   return !opp;
      default: return opp;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (clr) begin
      out_up    <= 1'b0;
      out_down  <= 1'b0;
      out_left  <= 1'b0;
      out_right <= 1'b0;
    end else begin
      out_up    <= cell_fn(cfg[1:0], in_down,  all_and, any_or);
      out_down  <= cell_fn(cfg[3:2], in_up,    all_and, any_or);
      out_left  <= cell_fn(cfg[5:4], in_right, all_and, any_or);
      out_right <= cell_fn(cfg[7:6], in_left,  all_and, any_or);
    end
  end
endmodule
