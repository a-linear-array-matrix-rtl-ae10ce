// tb_lamm_array: end-to-end test of the linear-array matrix multiplier.
//
// Several arrays run side by side, each driven and checked by its own host
// model (lamm_host_model), which feeds random matrices on the systolic
// schedule and checks every element of C at OC on its predicted cycle, and
// every element of A and B at OA and OB:
//   u0  default parameters (n = 3, 7 processors), 4 products, random data on
//       idle IB/IC cycles; round 0 starts c_11 at cycle 6 so the internal
//       port values can be compared with the printed cells of the 3 x 3
//       worked example (which operands are at which processor on cycles
//       8..15, and the two partial sums shown there);
//   u1  n = 2: the accumulator delay line has zero stages;
//   u2  n = 6, 2 products;
//   u3  4x3 by 3x2 (p > r), d = p = 4;
//   u4  2x3 by 3x4 (p < r): the host feeds the transposes;
//   u5  3x2 by 2x3 with d = 5 > p (spare slots between rows).
// It also checks the total latency of the square case: the last result
// leaves OC at t_s + (3n-2)(n-1) + (2n-2)n + (n-1).
// Mechanisms counted (each must occur): zero lead-in on IA, junk on idle
// IB/IC, zero-length S_C, transposed feed, spacing d > p, figure cells.
module tb_lamm_array;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  localparam int WATCHDOG = 20000;

  // ---------------------------------------------------------------- u0
  logic [15:0] ia0, ib0, oa0, ob0;
  logic [31:0] ic0, oc0;
  int tl0, rnd0, ck0, fl0, nr0, nj0, nz0, ts0, lr0;
  logic done0;

  lamm_array dut0 (
    .clk(clk), .ia(ia0), .ib(ib0), .ic(ic0), .oa(oa0), .ob(ob0), .oc(oc0)
  );

  lamm_host_model #(.P(3), .Q(3), .R(3), .D(3), .NUM_PE(7), .ROUNDS(4),
                    .JUNK(1'b1), .TS_SET(6)) h0 (
    .clk(clk), .ia(ia0), .ib(ib0), .ic(ic0), .oa(oa0), .ob(ob0), .oc(oc0),
    .tl(tl0), .round_no(rnd0), .done(done0), .checks(ck0), .failures(fl0),
    .n_results(nr0), .n_junk(nj0), .n_zero_lead(nz0), .t_s_out(ts0),
    .last_result(lr0)
  );

  // ---------------------------------------------------------------- u1..u5
  `define LAMM_UNIT(ID, NN, DD, NPE, PP, QQ, RR, RND, JK)                        \
    logic [15:0] ia``ID, ib``ID, oa``ID, ob``ID;                                  \
    logic [31:0] ic``ID, oc``ID;                                                  \
    int tl``ID, rnd``ID, ck``ID, fl``ID, nr``ID, nj``ID, nz``ID, ts``ID, lr``ID;  \
    logic done``ID;                                                               \
    lamm_array #(.N(NN), .D(DD), .NUM_PE(NPE)) dut``ID (                          \
      .clk(clk), .ia(ia``ID), .ib(ib``ID), .ic(ic``ID),                           \
      .oa(oa``ID), .ob(ob``ID), .oc(oc``ID));                                     \
    lamm_host_model #(.P(PP), .Q(QQ), .R(RR), .D(DD), .NUM_PE(NPE),               \
                      .ROUNDS(RND), .JUNK(JK)) h``ID (                            \
      .clk(clk), .ia(ia``ID), .ib(ib``ID), .ic(ic``ID),                           \
      .oa(oa``ID), .ob(ob``ID), .oc(oc``ID),                                      \
      .tl(tl``ID), .round_no(rnd``ID), .done(done``ID), .checks(ck``ID),          \
      .failures(fl``ID), .n_results(nr``ID), .n_junk(nj``ID),                     \
      .n_zero_lead(nz``ID), .t_s_out(ts``ID), .last_result(lr``ID));

  `LAMM_UNIT(1, 2, 2, 4, 2, 2, 2, 3, 1'b1)
  `LAMM_UNIT(2, 6, 6, 16, 6, 6, 6, 2, 1'b0)
  `LAMM_UNIT(3, 4, 4, 7, 4, 3, 2, 2, 1'b1)
  `LAMM_UNIT(4, 4, 4, 7, 2, 3, 4, 2, 1'b1)
  `LAMM_UNIT(5, 5, 5, 6, 3, 2, 3, 2, 1'b0)

  // ---------------------------------------------------------------- figure
  // Internal port values of u0, copied out of the generate hierarchy.
  localparam int NPE0 = 7;
  logic [15:0] pa [NPE0];
  logic [15:0] pb [NPE0];
  logic [31:0] pc [NPE0];
  logic [31:0] ps [NPE0];
  for (genvar k = 0; k < NPE0; k++) begin : g_probe
    assign pa[k] = dut0.g_pe[k].u_pe.ip_a;
    assign pb[k] = dut0.g_pe[k].u_pe.ip_b;
    assign pc[k] = dut0.g_pe[k].u_pe.ip_c;
    assign ps[k] = dut0.g_pe[k].u_pe.sum;
  end

  int fig_checks = 0;

  function automatic void expect_eq(string what, longint got, longint exp);
    checks++;
    fig_checks++;
    if (got != exp) begin
      failures++;
      $display("figure cell t=%0d %s: got %0d expected %0d", tl0, what, got, exp);
    end
  endfunction

  // Processor numbers and matrix indices below are 1-based as printed.
  function automatic void fig_a(int proc, int i, int j);
    expect_eq($sformatf("P%0d a%0d%0d", proc, i, j), longint'(pa[proc-1]),
              longint'($unsigned(h0.ea[i-1][j-1])));
  endfunction
  function automatic void fig_b(int proc, int i, int j);
    expect_eq($sformatf("P%0d b%0d%0d", proc, i, j), longint'(pb[proc-1]),
              longint'($unsigned(h0.eb[i-1][j-1])));
  endfunction
  function automatic void fig_c1(int proc);   // c_ij^(1): still zero
    expect_eq($sformatf("P%0d c(1)", proc), longint'(pc[proc-1]), 0);
  endfunction
  function automatic void fig_c2(int proc, int i, int j);  // c_ij^(2) = a_i1*b_1j
    expect_eq($sformatf("P%0d c%0d%0d(2)", proc, i, j), longint'(ps[proc-1]),
              longint'($unsigned(32'(longint'(h0.ea[i-1][0]) * longint'(h0.eb[0][j-1])))));
  endfunction

  always @(posedge clk) if (rnd0 == 0) begin
    case (tl0)
      6:  fig_c1(7);
      8:  begin fig_b(1,1,3); fig_c1(6); end
      9:  begin fig_b(1,1,2); fig_c1(7); end
      10: begin fig_b(1,1,1); fig_b(2,1,3); fig_c1(5); fig_c1(7); end
      11: begin fig_b(2,1,2); fig_c1(6); end
      12: begin fig_a(1,1,1); fig_b(1,2,3); fig_b(2,1,1); fig_b(3,1,3);
                fig_c1(4); fig_c1(6); fig_c1(7); end
      13: begin fig_a(1,2,1); fig_b(1,2,2); fig_a(2,1,1); fig_b(3,1,2);
                fig_c1(5); fig_c1(7); end
      14: begin fig_a(1,3,1); fig_b(1,2,1); fig_a(2,2,1); fig_b(2,2,3);
                fig_a(3,1,1); fig_b(3,1,1); fig_c1(3); fig_c2(3,1,1);
                fig_b(4,1,3); fig_c1(5); fig_c1(6); fig_c1(7); end
      15: begin fig_a(1,1,2); fig_a(2,3,1); fig_b(2,2,2); fig_a(3,2,1);
                fig_a(4,1,1); fig_b(4,1,2); fig_c1(4); fig_c2(4,1,2); fig_c1(6); end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- wrap-up
  function automatic void mech(string what, int count);
    checks++;
    $display("mechanism %-34s occurred %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("  never happened");
    end
  endfunction

  function automatic void latency(string what, int got, int n, int ts);
    int exp = ts + (3*n-2)*(n-1) + (2*n-2)*n + (n-1);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: last result at cycle %0d, expected %0d", what, got, exp);
    end
  endfunction

  always @(posedge clk) begin
    cycles++;
    if (cycles >= WATCHDOG) begin
      failures++;
      $display("watchdog: simulation did not finish in %0d cycles", WATCHDOG);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    wait (done0 && done1 && done2 && done3 && done4 && done5);
    checks   += ck0 + ck1 + ck2 + ck3 + ck4 + ck5;
    failures += fl0 + fl1 + fl2 + fl3 + fl4 + fl5;
    latency("n=3", lr0, 3, ts0);
    latency("n=2", lr1, 2, ts1);
    latency("n=6", lr2, 6, ts2);
    checks++;
    if (nr0 != 4 * 9 || nr1 != 3 * 4 || nr2 != 2 * 36 || nr3 != 2 * 8 ||
        nr4 != 2 * 8 || nr5 != 2 * 9) begin
      failures++;
      $display("wrong number of results: %0d %0d %0d %0d %0d %0d",
               nr0, nr1, nr2, nr3, nr4, nr5);
    end
    mech("figure 3x3 example cells checked", fig_checks);
    mech("zero lead-in on IA (n=3)", (nz0 >= 6) ? nz0 : 0);
    mech("random data on idle IB/IC", nj0 + nj1 + nj3 + nj4);
    mech("zero-length S_C (n=2) results", nr1);
    mech("non-square p>r results", nr3);
    mech("transposed feed p<r results", nr4);
    mech("row spacing d>p results", nr5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
