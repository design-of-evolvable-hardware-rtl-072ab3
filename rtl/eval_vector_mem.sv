// eval_vector_mem: memory of evaluation vectors for the EHW fitness unit.
//
// Entry layout {mask, expected, input}, EDGE bits each: the pattern driven on
// the array's edge inputs, the output pattern wanted on the edge outputs, and
// a care mask selecting which output edges are compared. Written by the host
// one entry per clock; read asynchronously (a small distributed RAM). The
// memory itself is the processor's; the mask field is this design's choice.
module eval_vector_mem #(
  parameter int unsigned EDGE  = 24,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [3*EDGE-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [EDGE-1:0]   vec_in,
  output logic [EDGE-1:0]   vec_exp,
  output logic [EDGE-1:0]   vec_mask
);
  logic [3*EDGE-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign {vec_mask, vec_exp, vec_in} = mem[raddr];
endmodule
