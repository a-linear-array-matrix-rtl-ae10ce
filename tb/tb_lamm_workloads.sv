// tb_lamm_workloads: matrix sizes other than n x n on the default array
// (every parameter of lamm_array at its default).
//
// The array at its default size (n = 3, 7 processors) is driven by a
// task that feeds one 3 x 3 product on the systolic schedule and collects
// the nine results from OC on their predicted cycles. On top of it the
// testbench runs the two ways of handling other sizes:
//   * smaller matrices: a 2 x 2 product (and a 3x2 by 2x1 product) padded
//     with zero rows and columns to 3 x 3; the padding results must be 0;
//   * larger matrices: a 6 x 6 product split into 3 x 3 blocks,
//     C_IJ = sum over K of A_IK * B_KJ, eight array runs whose block
//     results the testbench adds up.
// Each result is compared with a product computed directly in the
// testbench. Counted mechanisms: padded runs and block runs.
module tb_lamm_workloads;

  localparam int N  = 3;
  localparam int NP = 3 * N - 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_padded = 0;
  int n_blocks = 0;

  logic [15:0] ia, ib, oa, ob;
  logic [31:0] ic, oc;

  lamm_array dut (.clk(clk), .ia(ia), .ib(ib), .ic(ic), .oa(oa), .ob(ob), .oc(oc));

  typedef logic signed [15:0] elem_t;
  typedef logic signed [31:0] acc_t;
  typedef elem_t mat_t [N][N];
  typedef acc_t  res_t [N][N];

  // Feed one N x N product and return what leaves OC on the result cycles.
  // Square schedule: t_s = NP (NP zero cycles on IA first),
  //   c_ij at t_s + (i+j-2)N + (i-1), a_ij at t_s + (2N-3)(N-1) + (j-1)N + (i-1),
  //   b_ij at t_s + (2N-5)(N-1) + (N-j) + (i-1)(N+1),
  //   result c_ij at t_s + (3N-2)(N-1) + (i+j-2)N + (i-1).
  task automatic multiply(input mat_t a, input mat_t b, output res_t c);
    int ts, ta, tb, tr, t_end, u, i, j, s;
    ts = NP;
    ta = ts + (2*N-3)*(N-1);
    tb = ts + (2*N-5)*(N-1);
    tr = ts + (3*N-2)*(N-1);
    t_end = tr + (2*N-2)*N + (N-1);
    for (int t = 0; t <= t_end; t++) begin
      @(negedge clk);
      u = t - tr;
      if (u >= 0) begin
        s = u / N; i = u % N; j = s - i;
        if (j >= 0 && j < N) c[i][j] = acc_t'(oc);
      end
      ia = '0; ib = '0; ic = '0;
      u = t - ta;
      if (u >= 0 && u / N < N) ia = a[u % N][u / N];
      u = t - tb;
      if (u >= 0 && u / (N+1) < N && u % (N+1) < N) ib = b[u / (N+1)][N - 1 - u % (N+1)];
    end
  endtask

  function automatic elem_t rnd();
    return elem_t'($urandom_range(0, 2000)) - elem_t'(1000);
  endfunction

  task automatic check(string what, acc_t got, acc_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat_t a, b;
    res_t c;
    elem_t big_a [2*N][2*N];
    elem_t big_b [2*N][2*N];
    acc_t  big_c [2*N][2*N];
    acc_t  e;
    ia = '0; ib = '0; ic = '0;

    // 2 x 2 times 2 x 2, padded to 3 x 3.
    foreach (a[i, j]) begin
      a[i][j] = (i < 2 && j < 2) ? rnd() : '0;
      b[i][j] = (i < 2 && j < 2) ? rnd() : '0;
    end
    multiply(a, b, c);
    n_padded++;
    foreach (c[i, j]) begin
      e = (i < 2 && j < 2) ? acc_t'(a[i][0]) * acc_t'(b[0][j]) + acc_t'(a[i][1]) * acc_t'(b[1][j]) : '0;
      check($sformatf("2x2 padded c%0d%0d", i + 1, j + 1), c[i][j], e);
    end

    // 3 x 2 times 2 x 1, padded to 3 x 3.
    foreach (a[i, j]) begin
      a[i][j] = (j < 2) ? rnd() : '0;
      b[i][j] = (i < 2 && j < 1) ? rnd() : '0;
    end
    multiply(a, b, c);
    n_padded++;
    foreach (c[i, j]) begin
      e = (j < 1) ? acc_t'(a[i][0]) * acc_t'(b[0][0]) + acc_t'(a[i][1]) * acc_t'(b[1][0]) : '0;
      check($sformatf("3x2x1 padded c%0d%0d", i + 1, j + 1), c[i][j], e);
    end

    // 6 x 6 in 3 x 3 blocks.
    foreach (big_a[i, j]) begin
      big_a[i][j] = rnd();
      big_b[i][j] = rnd();
      big_c[i][j] = '0;
    end
    for (int bi = 0; bi < 2; bi++)
      for (int bj = 0; bj < 2; bj++)
        for (int bk = 0; bk < 2; bk++) begin
          foreach (a[i, j]) begin
            a[i][j] = big_a[bi*N + i][bk*N + j];
            b[i][j] = big_b[bk*N + i][bj*N + j];
          end
          multiply(a, b, c);
          n_blocks++;
          foreach (c[i, j]) big_c[bi*N + i][bj*N + j] += c[i][j];
        end
    foreach (big_c[i, j]) begin
      e = '0;
      for (int k = 0; k < 2*N; k++) e += acc_t'(big_a[i][k]) * acc_t'(big_b[k][j]);
      check($sformatf("6x6 blocked c%0d%0d", i + 1, j + 1), big_c[i][j], e);
    end

    checks++;
    if (n_padded != 2 || n_blocks != 8) begin
      failures++;
      $display("mechanism missing: padded runs %0d, block runs %0d", n_padded, n_blocks);
    end
    $display("padded runs %0d, block runs %0d", n_padded, n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
