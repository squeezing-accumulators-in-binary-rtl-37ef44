// Accumulator adder with carry in, ordinary (modulo) or saturating.
//
//   ACC_ORDINARY   : sum = (acc + addend + cin) mod 2^ACC_W
//   ACC_SATURATING : sum = min(acc + addend + cin, 2^ACC_W - 1)
//
// The carry in is how the rounding of a scaled partial sum is folded into the
// accumulation without a separate incrementer. The sum is formed one bit
// wider than the wider operand so that the true result is never lost; the
// ordinary adder keeps its low ACC_W bits, the saturating adder clips it.
// Both operands are unsigned (partial sums are popcounts), so the lower
// clip bound 0 can never be reached and only the upper bound is built.
// overflow_o flags that the true sum did not fit: the ordinary adder wrapped
// or the saturating adder clipped. Purely combinational.
//
// The two adder functions and the use of the carry in for rounding follow
// the method; the wide-add-then-select structure and overflow_o are this
// design's own choices.
module acc_adder
  import bnn_pkg::*;
#(
  parameter int unsigned ACC_W = bnn_pkg::ACC_WIDTH,
  parameter int unsigned IN_W  = bnn_pkg::ACC_WIDTH,
  parameter acc_mode_e   MODE  = bnn_pkg::ACC_MODE
) (
  input  logic [ACC_W-1:0] acc_i,
  input  logic [IN_W-1:0]  addend_i,
  input  logic             cin_i,
  output logic [ACC_W-1:0] sum_o,
  output logic             overflow_o
);

  localparam int unsigned SW = ((ACC_W > IN_W) ? ACC_W : IN_W) + 1;
  localparam logic [SW-1:0] MAX_VAL = SW'((2 ** ACC_W) - 1);

  logic [SW-1:0] full_sum;

  always_comb begin
    full_sum   = SW'(acc_i) + SW'(addend_i) + SW'(cin_i);
    overflow_o = (full_sum > MAX_VAL);
    if (MODE == ACC_SATURATING && overflow_o) begin
      sum_o = ACC_W'(MAX_VAL);
    end else begin
      sum_o = full_sum[ACC_W-1:0];
    end
  end

endmodule
