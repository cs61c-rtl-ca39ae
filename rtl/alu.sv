// alu: 32-bit arithmetic-logic unit of the MIPS-lite datapath.
//
// ALUctr selects add, subtract, OR, AND or signed set-less-than. Add and
// subtract share one adder32: subtraction adds the inverted B with a carry
// in of 1. Set-less-than gives 1 when A < B as signed numbers, else 0.
// Zero is 1 when the result is all zeros; with ALUctr = subtract it is the
// A == B test that beq uses. Fully combinational: the ALU has no clock.
// MIPS-lite itself needs only add, subtract and OR; AND and set-less-than
// are the two further operations of the full MIPS ALU. The ALUctr encoding
// is this design's own.
module alu
  import mips_lite_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_ctr_e    alu_ctr,
  output logic [31:0] result,
  output logic        zero
);

  logic        sub;
  logic [31:0] b_eff;
  logic [31:0] sum;
  logic        cout_unused;
  logic        lt;

  // Subtract for SUB and SLT (SLT compares via A - B)
  assign sub   = (alu_ctr == ALU_SUB) || (alu_ctr == ALU_SLT);
  assign b_eff = sub ? ~b : b;

  adder32 #(.W(32)) u_add (
    .a   (a),
    .b   (b_eff),
    .cin (sub),
    .sum (sum),
    .cout(cout_unused)
  );

  // Signed A < B: the sign of A - B, corrected when the subtraction overflows
  assign lt = (a[31] != b[31]) ? a[31] : sum[31];

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD, ALU_SUB: result = sum;
      ALU_OR:           result = a | b;
      ALU_AND:          result = a & b;
      ALU_SLT:          result = {31'd0, lt};
      default:          result = sum;
    endcase
  end

  assign zero = (result == 32'd0);

endmodule
