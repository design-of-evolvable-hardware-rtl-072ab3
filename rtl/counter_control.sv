// counter_control: the counter control unit that sequences repeated steps.
//
// A chromosome longer than one 32-bit word is handled by repeating some time
// steps once per word. The unit has three parts:
//   * a bit clock counter that counts the repetitions of the current step,
//   * a comparator whose output "less" is high while that count is below the
//     number of repetitions wanted (repeat_times), and
//   * a main clock counter ("time") that holds its value while less is high
//     (or while the fitness evaluator asserts time_stop) and otherwise
//     advances by one per clock.
// less is t[0]; three flip-flops delay it by one, two and three clocks to give
// t[1], t[2], t[3], which drive the later pipeline stages so that word k is in
// stage j at t[j]. This structure is the processor's; restarting the bit
// counter whenever time changes, and the rep_en qualifier that tells the unit
// which steps repeat, are this design's choices.
//
// Interface: time_clr forces time to 0 (start of a new sequence); run allows
// time to advance. Outputs change on the clock edge.
module counter_control #(
  parameter int unsigned CNT_W = 5   // width of the repeat count
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,           // sequencer active
  input  logic       time_clr,      // restart the sequence at time 0
  input  logic       time_stop,     // hold time (fitness evaluation running)
  input  logic       rep_en,        // current time step is a repeated one
  input  logic [CNT_W-1:0] repeat_times,  // repetitions of a repeated step
  output logic [3:0] time_q,        // main clock counter
  output logic       less,          // comparator output (= t[0])
  output logic [3:0] t,             // t[0] and its delayed copies
  output logic [CNT_W-1:0] bit_count      // index of the current repetition
);
  logic advance;

  // comparator
  assign less    = run && rep_en && (bit_count < repeat_times);
  assign advance = run && !less && !time_stop;

  // main clock counter: loads its own value (holds) while less
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        time_q <= '0;
    else if (time_clr) time_q <= '0;
    else if (advance)  time_q <= time_q + 4'd1;
  end

  // bit clock counter: counts repetitions, restarts on a new time step
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   bit_count <= '0;
    else if (time_clr || advance) bit_count <= '0;
    else if (less)                bit_count <= bit_count + 1'b1;
  end

  // delay chain t(0) -> t(1) -> t(2) -> t(3)
  logic [3:1] dly;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dly <= '0;
    else        dly <= {dly[2:1], less};
  end
  assign t = {dly, less};
endmodule
