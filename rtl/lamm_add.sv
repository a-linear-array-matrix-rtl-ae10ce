// lamm_add: the adder unit of a processor (the box marked +).
//
// Combinational sum of the partial result arriving at IP_C and the
// multiplier's product. The product is sign-extended (or truncated) to the
// accumulator width C_W and the sum wraps modulo 2**C_W; saturation is not
// part of the algorithm and is not done.
module lamm_add #(
  parameter int unsigned P_W = lamm_pkg::DEF_A_W + lamm_pkg::DEF_B_W,
  parameter int unsigned C_W = lamm_pkg::DEF_C_W
) (
  input  logic signed [C_W-1:0] c_in,
  input  logic signed [P_W-1:0] prod,
  output logic signed [C_W-1:0] sum
);

  always_comb sum = c_in + C_W'(prod);

endmodule
