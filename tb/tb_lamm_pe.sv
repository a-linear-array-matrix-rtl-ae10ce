// tb_lamm_pe: checks one processor's arithmetic and its three delays.
//
// Random a, b, c are applied every cycle to a processor with D = 3 (the
// worked example: S_C of one stage) and to one with D = 6 (S_C of four
// stages). The testbench keeps its own history of the inputs and checks
// that OP_A equals a from 1 cycle ago, OP_B equals b from 2 cycles ago and
// OP_C equals c + a*b (32-bit wrap) from D-1 cycles ago.
module tb_lamm_pe;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [15:0] a, b;
  logic [31:0] c;
  logic [15:0] oa3, ob3, oa6, ob6;
  logic [31:0] oc3, oc6;

  lamm_pe u3 (
    .clk(clk), .ip_a(a), .ip_b(b), .ip_c(c), .op_a(oa3), .op_b(ob3), .op_c(oc3)
  );
  lamm_pe #(.D(6)) u6 (
    .clk(clk), .ip_a(a), .ip_b(b), .ip_c(c), .op_a(oa6), .op_b(ob6), .op_c(oc6)
  );

  logic [15:0] ha [$];
  logic [15:0] hb [$];
  logic [31:0] hs [$];   // expected c + a*b of each past cycle

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; c = '0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      // Outputs now hold what entered in earlier cycles.
      if (t >= 1) check("D=3 OP_A", 32'(oa3), 32'(ha[0]));
      if (t >= 2) check("D=3 OP_B", 32'(ob3), 32'(hb[1]));
      if (t >= 2) check("D=3 OP_C", oc3, hs[1]);
      if (t >= 1) check("D=6 OP_A", 32'(oa6), 32'(ha[0]));
      if (t >= 2) check("D=6 OP_B", 32'(ob6), 32'(hb[1]));
      if (t >= 5) check("D=6 OP_C", oc6, hs[4]);
      a = 16'($urandom); b = 16'($urandom); c = 32'($urandom);
      ha.push_front(a);
      hb.push_front(b);
      hs.push_front(32'(longint'(c) + longint'($signed(a)) * longint'($signed(b))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
