// ava: Absolute Value and Accumulate unit, one per template vector.
//
// Computes the Manhattan distance sum_i |t_i - x_i| one element per clock, as a two-step
// pipeline behind the SRAM read:
//   1. t - x is formed by a subtractor; its carry (1 when t >= x) is inverted and steers a
//      second adder/subtractor that either adds the difference to 0 or subtracts it from
//      0, giving |t - x|, which is stored in the difference register.
//   2. The difference register is added into the accumulator register.
// An element entering on t/x with elem_valid high is therefore in acc two clocks later.
// Elements with elem_valid low contribute 0. latch_clr clears the accumulator on the
// clock edge at which the following stage takes its value, so the next vector starts
// from 0 without a lost clock. clear (used while templates are loaded) empties the
// whole pipeline. ACC_W defaults to DATA_W + clog2(M_ELEM) bits, which cannot overflow.
// The subtract / carry-corrected add-subtract / register / accumulate structure is the
// document's; the valid flag and the clear input are this design's choices.
module ava #(
  parameter int unsigned DATA_W = mdwta_pkg::DATA_W_DEF,
  parameter int unsigned M_ELEM = mdwta_pkg::M_ELEM_DEF,
  localparam int unsigned ACC_W = mdwta_pkg::acc_width(DATA_W, M_ELEM)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [DATA_W-1:0] t,
  input  logic [DATA_W-1:0] x,
  input  logic              elem_valid,
  input  logic              latch_clr,
  output logic [ACC_W-1:0]  acc
);

  logic              carry;     // 1: no borrow, t >= x
  logic [DATA_W-1:0] diff;      // t - x modulo 2^DATA_W
  logic              sub_add;   // 1: subtract diff from 0
  logic [DATA_W-1:0] abs_diff;
  logic [DATA_W-1:0] diff_reg;

  // Subtraction stage: t + ~x + 1.
  assign {carry, diff} = {1'b0, t} + {1'b0, ~x} + {{DATA_W{1'b0}}, 1'b1};
  assign sub_add       = ~carry;
  // Addition/subtraction stage with 0 as the other operand.
  assign abs_diff      = sub_add ? (DATA_W'(0) - diff) : (DATA_W'(0) + diff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff_reg <= '0;
      acc      <= '0;
    end else if (clear) begin
      diff_reg <= '0;
      acc      <= '0;
    end else begin
      diff_reg <= elem_valid ? abs_diff : '0;
      acc      <= latch_clr ? '0 : acc + ACC_W'(diff_reg);
    end
  end

endmodule
