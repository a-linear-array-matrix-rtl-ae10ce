// lamm_array: systolic linear array that multiplies two matrices.
//
// NUM_PE identical processors (lamm_pe) are chained. Elements of A enter at
// IA and elements of B at IB, on processor 1, and move right: A by one
// processor per cycle, B by one processor every two cycles. Partial results
// of C enter at IC, on the last processor, and move left by one processor
// every D-1 cycles; each processor they pass adds a*b to them. Because the
// three streams move at different speeds, a_ik and b_kj meet c_ij exactly
// once for every k, with no control signal anywhere: all control is in the
// order and timing in which the host feeds the ports, and the array itself
// only needs three input and three output ports whatever the matrix size.
//
// Configurations:
//   * n x n times n x n: NUM_PE = 3n-2, D = n (the defaults, n = N = 3, the
//     size of the worked example).
//   * p x q times q x r with p >= r: NUM_PE = p+q+r-2, D = d >= p. For p < r
//     the host feeds the transposes (B^T A^T = C^T).
//
// Feeding schedule (cycle numbers relative to t_s, the cycle c_11 enters IC):
//   c_ij (initialised to 0) into IC at t_s + (i+j-2)*D + (i-1);
//   a_ij into IA at t_a + (j-1)*D + (i-1),  t_a = t_s + (D-1)*(p+r-2) - (q-1);
//   b_ij into IB at t_b + (r-j) + (i-1)*(D+1), t_b = t_a - (q+r-2);
//   0 into IA at every other cycle, including at least NUM_PE cycles before
//   t_s; IB and IC may carry anything at the other cycles.
// The finished c_ij then leaves OC at t_s + NUM_PE*(D-1) + (i+j-2)*D + (i-1),
// a_ij leaves OA NUM_PE cycles after it entered, and b_ij leaves OB 2*NUM_PE
// cycles after it entered.
//
// The processor chain, its ports and delays follow the published algorithm.
// Operand widths, signed arithmetic and the absence of a reset are choices
// of this implementation. All ports are plain vectors; one clock drives all.
module lamm_array #(
  parameter int unsigned N      = lamm_pkg::DEF_N,
  parameter int unsigned D      = N,
  parameter int unsigned NUM_PE = lamm_pkg::square_len(N),
  parameter int unsigned A_W    = lamm_pkg::DEF_A_W,
  parameter int unsigned B_W    = lamm_pkg::DEF_B_W,
  parameter int unsigned C_W    = lamm_pkg::DEF_C_W
) (
  input  logic           clk,
  input  logic [A_W-1:0] ia,
  input  logic [B_W-1:0] ib,
  input  logic [C_W-1:0] ic,
  output logic [A_W-1:0] oa,
  output logic [B_W-1:0] ob,
  output logic [C_W-1:0] oc
);

  if (NUM_PE < 1) begin : g_bad_len
    $error("lamm_array: NUM_PE must be at least 1");
  end

  // a_link[k], b_link[k]: IP_A, IP_B of processor k (0-based); index NUM_PE
  // is the output of the last processor. c_in[k], c_out[k]: IP_C and OP_C of
  // processor k. A and B run from low to high k, C from high to low k.
  logic [A_W-1:0] a_link [NUM_PE+1];
  logic [B_W-1:0] b_link [NUM_PE+1];
  logic [C_W-1:0] c_in   [NUM_PE];
  logic [C_W-1:0] c_out  [NUM_PE];

  assign a_link[0] = ia;
  assign b_link[0] = ib;

  for (genvar k = 0; k < NUM_PE; k++) begin : g_pe
    if (k == NUM_PE - 1) begin : g_last
      assign c_in[k] = ic;
    end else begin : g_mid
      assign c_in[k] = c_out[k+1];
    end

    lamm_pe #(.A_W(A_W), .B_W(B_W), .C_W(C_W), .D(D)) u_pe (
      .clk  (clk),
      .ip_a (a_link[k]),
      .ip_b (b_link[k]),
      .ip_c (c_in[k]),
      .op_a (a_link[k+1]),
      .op_b (b_link[k+1]),
      .op_c (c_out[k])
    );
  end

  assign oa = a_link[NUM_PE];
  assign ob = b_link[NUM_PE];
  assign oc = c_out[0];

endmodule
