// tb_lamm_add: checks the accumulator adder.
//
// The product input is sign-extended to the accumulator width before the
// addition, and the sum wraps modulo 2**C_W. Checked at the processor's
// default sizes (32-bit product, 32-bit accumulator) and with a narrower
// product (16-bit) so that sign extension is exercised.
module tb_lamm_add;

  int checks = 0;
  int failures = 0;

  logic signed [31:0] c32, p32, s32;
  logic signed [31:0] c2, s2;
  logic signed [15:0] p16;

  lamm_add u32 (.c_in(c32), .prod(p32), .sum(s32));
  lamm_add #(.P_W(16), .C_W(32)) u16 (.c_in(c2), .prod(p16), .sum(s2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    // Wrap-around at the top of the range.
    c32 = 32'h7fff_ffff; p32 = 32'sd1; #1;
    checks++;
    if (s32 !== 32'h8000_0000) begin failures++; $display("wrap failed"); end
    repeat (500) begin
      c32 = 32'($urandom); p32 = 32'($urandom);
      c2  = 32'($urandom); p16 = 16'($urandom);
      #1;
      e = longint'(c32) + longint'(p32);
      checks++;
      if (s32 !== 32'(e)) begin
        failures++;
        $display("32+32: %0d + %0d gave %0d", c32, p32, s32);
      end
      e = longint'(c2) + longint'(p16);
      checks++;
      if (s2 !== 32'(e)) begin
        failures++;
        $display("32+16: %0d + %0d gave %0d", c2, p16, s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
