// scaling_acc: scaling accumulator of a distributed arithmetic MAC.
//
// Together with one read port of coef_lut it forms a 2-C MAC. The operand
// bits arrive LSB first, SHIFT bit positions apart from one step to the next
// (SHIFT = 1 for the serial MAC, 2 for each of the two accumulators of a
// 2-bit parallel MAC, one taking the even bits and one the odd bits). Each
// step adds the LUT word for the current bit pair; before the next, more
// significant, word arrives the running sum is shifted right by SHIFT
// (arithmetic shift), so the accumulator keeps the upper N+2 bits of the
// exact sum and the shifted-out bits are dropped (truncation). The last step
// is not followed by a shift; when it carries the two's complement sign bits
// (sub high) its word is subtracted.
//
// For the serial MAC (SHIFT = 1, sub = last) the register holds
// floor((a*C +/- b*S) / 2^(N-1)) after N steps: the product in the units of
// the coordinates, as N+2 bits.
//
// Control: en advances one step; first starts from zero instead of the old
// sum; last marks the final step; sub subtracts the word. The result is valid
// the cycle after the last step and holds until the next enabled step.
module scaling_acc
  import vd_pkg::*;
#(
  parameter int unsigned N     = MR_N_DEFAULT,
  parameter int unsigned SHIFT = 1
) (
  input  logic                clk,
  input  logic                en,
  input  logic                first,
  input  logic                last,
  input  logic                sub,
  input  logic signed [N:0]   lut_word,
  output logic signed [N+1:0] acc
);

  logic signed [N+1:0] base;
  logic signed [N+1:0] word;
  logic signed [N+1:0] sum;

  assign base = first ? '0 : acc;
  assign word = (N+2)'(lut_word);
  assign sum  = sub ? (base - word) : (base + word);

  always_ff @(posedge clk) begin
    if (en) begin
      acc <= last ? sum : (sum >>> SHIFT);
    end
  end

endmodule
