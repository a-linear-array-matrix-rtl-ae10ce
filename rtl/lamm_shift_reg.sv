// lamm_shift_reg: fixed-length shift register (delay line).
//
// Each processor of the array holds two of these: S_B of length 1 on the
// B path and S_C of length n-2 (d-2 for non-square products) on the C path.
// They are what lets the array work without control: the different delays
// of the A, B and C streams make the right operands meet.
//
// Interface: din is sampled on every rising edge of clk; dout is the value
// din had LEN clock edges earlier. LEN = 0 is allowed (n = 2) and makes the
// register a plain wire. There is no enable and no reset: the stages always
// shift, and their power-up contents are flushed out after LEN cycles, as the
// algorithm needs no defined initial state here.
module lamm_shift_reg #(
  parameter int unsigned W   = lamm_pkg::DEF_A_W,
  parameter int unsigned LEN = 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (LEN == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] stage [LEN];

    always_ff @(posedge clk) begin
      stage[0] <= din;
      for (int unsigned i = 1; i < LEN; i++) stage[i] <= stage[i-1];
    end

    assign dout = stage[LEN-1];
  end

endmodule
