// lamm_host_model: behavioural model of the host that drives the array.
//
// Not synthesizable; used only by testbenches. It stands for the existing
// computer that holds the matrices and pumps them into the array. For each
// of ROUNDS products it draws a random P x Q matrix A and Q x R matrix B,
// computes C = A x B itself (wrapping to C_W bits), and then:
//   * feeds c_ij = 0, a_ij and b_ij into IC, IA and IB on the cycles of the
//     systolic schedule, and 0 into IA on every other cycle;
//   * checks every c_ij at OC on the cycle the schedule predicts, and every
//     a_ij at OA and b_ij at OB on the cycle it should leave the array.
// When P < R it feeds the transposes (B^T into IA, A^T into IB) and reads
// C^T, as the non-square form of the algorithm requires P >= R.
// With JUNK = 1 the cycles of IB and IC that carry no matrix element get
// random values instead of 0, to show the array needs no valid flags.
//
// Schedule, with t_s the cycle c_11 enters IC (pp, qq, rr: sizes after the
// optional transpose, D: row spacing, NUM_PE = pp+qq+rr-2):
//   IC: c_ij at t_s + (i+j-2)*D + (i-1)
//   IA: a_ij at t_a + (j-1)*D + (i-1),    t_a = t_s + (D-1)*(pp+rr-2) - (qq-1)
//   IB: b_ij at t_b + (rr-j) + (i-1)*(D+1), t_b = t_a - (qq+rr-2)
//   OC: c_ij at t_s + NUM_PE*(D-1) + (i+j-2)*D + (i-1)
// t_s is TS_SET if that is not negative, else the smallest cycle that leaves
// NUM_PE zero cycles on IA ahead of the first element.
//
// Timing convention: inputs change and outputs are sampled at the falling
// edge of clk; "cycle t" is the t-th falling edge of the round.
module lamm_host_model #(
  parameter int unsigned P      = 3,
  parameter int unsigned Q      = 3,
  parameter int unsigned R      = 3,
  parameter int unsigned D      = 3,
  parameter int unsigned NUM_PE = 7,
  parameter int unsigned A_W    = 16,
  parameter int unsigned B_W    = 16,
  parameter int unsigned C_W    = 32,
  parameter int unsigned ROUNDS = 1,
  parameter bit          JUNK   = 1'b0,
  parameter int          TS_SET = -1
) (
  input  logic           clk,
  output logic [A_W-1:0] ia,
  output logic [B_W-1:0] ib,
  output logic [C_W-1:0] ic,
  input  logic [A_W-1:0] oa,
  input  logic [B_W-1:0] ob,
  input  logic [C_W-1:0] oc,
  output int             tl,          // cycle number within the current round
  output int             round_no,
  output logic           done,
  output int             checks,
  output int             failures,
  output int             n_results,   // c_ij checked at OC
  output int             n_junk,      // idle IB/IC cycles fed with random data
  output int             n_zero_lead, // zero cycles on IA before t_s
  output int             t_s_out,
  output int             last_result  // cycle of the last c_ij at OC
);

  localparam bit TR = (P < R);
  localparam int PP = TR ? R : P;   // rows of the matrix fed into IA
  localparam int QQ = Q;
  localparam int RR = TR ? P : R;   // columns of the matrix fed into IB

  // Effective operands after the optional transpose.
  logic signed [A_W-1:0] ea [PP][QQ];
  logic signed [B_W-1:0] eb [QQ][RR];
  logic        [C_W-1:0] ec [PP][RR];

  int ts, ta, tb, t_end;

  function automatic void new_matrices();
    logic signed [A_W-1:0] am [P][Q];
    logic signed [B_W-1:0] bm [Q][R];
    longint acc;
    for (int i = 0; i < P; i++)
      for (int j = 0; j < Q; j++) am[i][j] = A_W'($urandom);
    for (int i = 0; i < Q; i++)
      for (int j = 0; j < R; j++) bm[i][j] = B_W'($urandom);
    for (int i = 0; i < PP; i++)
      for (int j = 0; j < QQ; j++) ea[i][j] = TR ? A_W'(bm[j][i]) : am[i][j];
    for (int i = 0; i < QQ; i++)
      for (int j = 0; j < RR; j++) eb[i][j] = TR ? B_W'(am[j][i]) : bm[i][j];
    for (int i = 0; i < P; i++)
      for (int j = 0; j < R; j++) begin
        acc = 0;
        for (int k = 0; k < Q; k++) acc += longint'(am[i][k]) * longint'(bm[k][j]);
        if (TR) ec[j][i] = C_W'(acc);
        else    ec[i][j] = C_W'(acc);
      end
  endfunction

  // Decoders: which element, if any, the schedule puts on a port at offset u
  // from the port's first slot. Return 1 and the indices when there is one.
  function automatic bit slot_a(int u, output int i, output int j);
    i = 0; j = 0;
    if (u < 0) return 0;
    j = u / D; i = u % D;
    return (i < PP) && (j < QQ);
  endfunction

  function automatic bit slot_b(int v, output int i, output int j);
    int col;
    i = 0; j = 0;
    if (v < 0) return 0;
    i = v / (D + 1); col = v % (D + 1);
    j = RR - 1 - col;
    return (col < RR) && (i < QQ);
  endfunction

  function automatic bit slot_c(int w, output int i, output int j);
    int s;
    i = 0; j = 0;
    if (w < 0) return 0;
    s = w / D; i = w % D; j = s - i;
    return (i < PP) && (j >= 0) && (j < RR);
  endfunction

  initial begin
    int i, j, lead, zero_lead_round;
    if (NUM_PE != PP + QQ + RR - 2)
      $fatal(1, "lamm_host_model: NUM_PE must be P+Q+R-2");
    if (D < PP)
      $fatal(1, "lamm_host_model: D must be at least max(P, R)");
    checks = 0; failures = 0; n_results = 0; n_junk = 0; n_zero_lead = 0;
    done = 1'b0; last_result = 0; tl = 0; round_no = 0;
    ia = '0; ib = '0; ic = '0;
    // Offsets of the first A and B slots from t_s.
    ta = (D - 1) * (PP + RR - 2) - (QQ - 1);
    tb = ta - (QQ + RR - 2);
    lead = (tb < ta) ? tb : ta;
    if (TS_SET >= 0) ts = TS_SET;
    else             ts = NUM_PE + ((lead < 0) ? -lead : 0);
    ta += ts; tb += ts;
    t_s_out = ts;
    t_end = ts + NUM_PE * (D - 1) + (PP + RR - 2) * D + (PP - 1);
    if (tb + 2 * NUM_PE + (RR - 1) + (QQ - 1) * (D + 1) > t_end)
      t_end = tb + 2 * NUM_PE + (RR - 1) + (QQ - 1) * (D + 1);
    for (int rnd = 0; rnd < ROUNDS; rnd++) begin
      round_no = rnd;
      new_matrices();
      zero_lead_round = 0;
      for (int t = 0; t <= t_end; t++) begin
        @(negedge clk);
        tl = t;
        // Outputs of cycle t.
        if (slot_c(t - ts - NUM_PE * (D - 1), i, j)) begin
          checks++; n_results++; last_result = t;
          if (oc !== ec[i][j]) begin
            failures++;
            $display("round %0d t=%0d: OC c[%0d][%0d]=%0d expected %0d",
                     rnd, t, i + 1, j + 1, $signed(oc), $signed(ec[i][j]));
          end
        end
        if (slot_a(t - ta - NUM_PE, i, j)) begin
          checks++;
          if (oa !== ea[i][j]) begin
            failures++;
            $display("round %0d t=%0d: OA a[%0d][%0d] wrong", rnd, t, i + 1, j + 1);
          end
        end
        if (slot_b(t - tb - 2 * NUM_PE, i, j)) begin
          checks++;
          if (ob !== eb[i][j]) begin
            failures++;
            $display("round %0d t=%0d: OB b[%0d][%0d] wrong", rnd, t, i + 1, j + 1);
          end
        end
        // Inputs of cycle t.
        if (slot_a(t - ta, i, j)) ia = ea[i][j];
        else                      ia = '0;
        if (t < ts && ia == '0) zero_lead_round++;
        if (slot_b(t - tb, i, j)) ib = eb[i][j];
        else if (JUNK) begin      ib = B_W'($urandom); n_junk++; end
        else                      ib = '0;
        if (slot_c(t - ts, i, j)) ic = '0;
        else if (JUNK) begin      ic = C_W'($urandom); n_junk++; end
        else                      ic = '0;
      end
      n_zero_lead = zero_lead_round;
    end
    @(negedge clk);
    done = 1'b1;
  end

endmodule
