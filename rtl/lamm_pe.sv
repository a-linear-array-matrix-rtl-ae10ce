// lamm_pe: one processor of the linear matrix-multiplication array.
//
// Every cycle the processor takes the values a, b and c present at its input
// ports IP_A, IP_B and IP_C and computes c + a*b. It has no control logic and
// no addressable memory: it always does the same thing, and the schedule on
// which the host feeds the array decides which values meet where.
//
// Data movement (from the algorithm description):
//   * a goes straight from IP_A to OP_A and is there one cycle later;
//   * b passes through the one-stage shift register S_B and is at OP_B two
//     cycles later;
//   * c + a*b passes through the shift register S_C of D-2 stages and is at
//     OP_C D-1 cycles later (D = n for n x n matrices, D = d >= p, r in the
//     non-square case).
// The "one more cycle" on each path is the register that hands the value to
// the next processor at the end of the cycle; it is modelled here as an
// output register after S_B and S_C (and as the only register on the A path).
// The inputs themselves are not registered: a processor's input ports carry
// exactly what its neighbour's output registers hold.
//
// Timing: if a, b, c are at IP_A, IP_B, IP_C in cycle t, then a is at OP_A
// in t+1, b at OP_B in t+2 and c + a*b at OP_C in t+D-1.
// No reset: the algorithm initialises the array by feeding zeros into IA
// for at least as many cycles as there are processors, which is enough to
// make every stale product zero; stale C values only ever leave at OC on
// cycles that carry no result.
module lamm_pe #(
  parameter int unsigned A_W = lamm_pkg::DEF_A_W,
  parameter int unsigned B_W = lamm_pkg::DEF_B_W,
  parameter int unsigned C_W = lamm_pkg::DEF_C_W,
  parameter int unsigned D   = lamm_pkg::DEF_N
) (
  input  logic           clk,
  input  logic [A_W-1:0] ip_a,
  input  logic [B_W-1:0] ip_b,
  input  logic [C_W-1:0] ip_c,
  output logic [A_W-1:0] op_a,
  output logic [B_W-1:0] op_b,
  output logic [C_W-1:0] op_c
);

  localparam int unsigned P_W    = A_W + B_W;
  localparam int unsigned SB_LEN = 1;
  localparam int unsigned SC_LEN = D - 2;

  // The C path needs D >= 2 (a delay of D-1 >= 1 cycles).
  if (D < 2) begin : g_bad_d
    $error("lamm_pe: D must be at least 2");
  end

  logic [P_W-1:0] prod;
  logic [C_W-1:0] sum;
  logic [B_W-1:0] sb_out;
  logic [C_W-1:0] sc_out;

  lamm_mult #(.A_W(A_W), .B_W(B_W)) u_mult (
    .a (ip_a),
    .b (ip_b),
    .p (prod)
  );

  lamm_add #(.P_W(P_W), .C_W(C_W)) u_add (
    .c_in (ip_c),
    .prod (prod),
    .sum  (sum)
  );

  lamm_shift_reg #(.W(B_W), .LEN(SB_LEN)) u_sb (
    .clk  (clk),
    .din  (ip_b),
    .dout (sb_out)
  );

  lamm_shift_reg #(.W(C_W), .LEN(SC_LEN)) u_sc (
    .clk  (clk),
    .din  (sum),
    .dout (sc_out)
  );

  // End-of-cycle transfer to the neighbouring processors.
  always_ff @(posedge clk) begin
    op_a <= ip_a;
    op_b <= sb_out;
    op_c <= sc_out;
  end

endmodule
