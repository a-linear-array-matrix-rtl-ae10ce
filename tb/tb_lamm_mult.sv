// tb_lamm_mult: checks the signed multiplier against integer arithmetic.
//
// Corner operands (0, 1, -1, most negative, most positive) in every pairing,
// then random pairs, at the default 16 x 16 size and at an unequal 8 x 12.
module tb_lamm_mult;

  int checks = 0;
  int failures = 0;

  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  logic signed [7:0]  a8;
  logic signed [11:0] b12;
  logic signed [19:0] p20;

  lamm_mult u16 (.a(a16), .b(b16), .p(p16));
  lamm_mult #(.A_W(8), .B_W(12)) u8 (.a(a8), .b(b12), .p(p20));

  localparam int CORNER [5] = '{0, 1, -1, -32768, 32767};

  task automatic try16(int a, int b);
    a16 = 16'(a); b16 = 16'(b);
    #1;
    checks++;
    if (p16 !== 32'(a * b)) begin
      failures++;
      $display("16x16: %0d * %0d gave %0d", a, b, p16);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    foreach (CORNER[i]) foreach (CORNER[j]) try16(CORNER[i], CORNER[j]);
    repeat (500) begin
      a = int'($signed(16'($urandom)));
      b = int'($signed(16'($urandom)));
      try16(a, b);
    end
    repeat (300) begin
      a = int'($signed(8'($urandom)));
      b = int'($signed(12'($urandom)));
      a8 = 8'(a); b12 = 12'(b);
      #1;
      checks++;
      if (p20 !== 20'(a * b)) begin
        failures++;
        $display("8x12: %0d * %0d gave %0d", a, b, p20);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
