// lamm_mult: the multiplier unit of a processor (the box marked X).
//
// Combinational two's-complement product of the operand at IP_A and the
// operand at IP_B. The product is full width (A_W + B_W bits), so it never
// overflows; the adder that follows brings it to the accumulator width.
// Signed arithmetic is this implementation's choice; the algorithm works for
// any ring.
module lamm_mult #(
  parameter int unsigned A_W = lamm_pkg::DEF_A_W,
  parameter int unsigned B_W = lamm_pkg::DEF_B_W
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  always_comb p = (A_W+B_W)'(a) * (A_W+B_W)'(b);

endmodule
