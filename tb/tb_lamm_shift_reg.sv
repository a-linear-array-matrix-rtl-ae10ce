// tb_lamm_shift_reg: checks the delay line at lengths 0, 1 and 7.
//
// A random word is applied every cycle; a software history of the inputs
// gives the expected output, which must equal the input LEN cycles earlier
// (the same cycle for LEN = 0). The first LEN outputs after start-up are
// not checked: the stages have no reset.
module tb_lamm_shift_reg;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [15:0] din;
  logic [15:0] d0, d1, d7;

  lamm_shift_reg #(.W(16), .LEN(0)) u0 (.clk(clk), .din(din), .dout(d0));
  lamm_shift_reg #(.W(16), .LEN(1)) u1 (.clk(clk), .din(din), .dout(d1));
  lamm_shift_reg #(.W(16), .LEN(7)) u7 (.clk(clk), .din(din), .dout(d7));

  logic [15:0] hist [$];

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      din = 16'($urandom);
      hist.push_front(din);           // hist[k]: input k cycles ago
      #1;
      check("LEN=0", d0, hist[0]);
      if (t >= 1) check("LEN=1", d1, hist[1]);
      if (t >= 7) check("LEN=7", d7, hist[7]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
