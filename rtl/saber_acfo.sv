// saber_acfo: accumulation / final output (AC-FO) unit, one per coefficient of W.
//
// An adder, a register and a multiplexer. While `acc_en` is set the adder sums the
// register, the reduced MAA row z and the pending sign bit cin (as carry-in), and
// the register takes the sum; on the first accumulation cycle (`acc_first`) the
// register term is replaced by zero, which clears the result of the previous
// multiplication without an extra cycle. While `shift_en` is set the multiplexer
// instead loads the register of the previous unit (shift_in), so the chain of
// units delivers W serially. The top unit of the chain has no multiplexer
// (HAS_MUX = 0) and simply holds its value while the chain shifts.
// The clearing through `acc_first` is this design's choice. One clock of latency:
// q changes on the clock edge that ends an accumulate or shift cycle.
module saber_acfo
  import saber_pkg::*;
#(
  parameter bit HAS_MUX = 1'b1
) (
  input  logic  clk,
  input  logic  acc_en,
  input  logic  acc_first,
  input  logic  shift_en,
  input  coef_t z,
  input  logic  cin,
  input  coef_t shift_in,
  output coef_t q
);

  coef_t sum;

  assign sum = (acc_first ? coef_t'(0) : q) + z + coef_t'(cin);

  always_ff @(posedge clk) begin
    if (acc_en)                  q <= sum;
    else if (HAS_MUX && shift_en) q <= shift_in;
  end

  // accumulating and shifting never overlap
  assert property (@(posedge clk) !(acc_en && shift_en));

endmodule
