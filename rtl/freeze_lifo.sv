// freeze_lifo: condition lifo that implements if/end-if in the SIMD array.
//
// Every PE runs the same instruction stream, so a PE skips a conditional
// section by freezing: FREEZEC/NC/Z/NZ push the outcome of the condition
// (1 = skip), UNFREEZE pops the last entry. The PE writes its registers,
// flags and memories only while no_freeze is high, that is while every
// entry of the lifo is zero. Push and pop are single-cycle. The lifo is
// DEPTH entries deep; pushing into a full lifo drops the oldest entry and
// popping an empty lifo leaves it empty (this design's choice).
module freeze_lifo #(
  parameter int unsigned DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic              push_val,
  input  logic              pop,
  output logic [DEPTH-1:0]  lifo,     // lifo[0] is the top
  output logic              no_freeze
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     lifo <= '0;
    else if (push)  lifo <= {lifo[DEPTH-2:0], push_val};
    else if (pop)   lifo <= {1'b0, lifo[DEPTH-1:1]};
  end

  assign no_freeze = ~|lifo;

endmodule
