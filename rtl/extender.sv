// extender: widens a 16-bit immediate to 32 bits.
//
// ExtOp = 1 copies bit 15 into the upper half (sign extension, used by lw,
// sw and beq); ExtOp = 0 fills the upper half with zeros (used by ori).
// Combinational. The 1/0 meaning of ExtOp is this design's choice.
module extender (
  input  logic        ext_op,
  input  logic [15:0] imm16,
  output logic [31:0] imm32
);

  always_comb imm32 = {{16{ext_op & imm16[15]}}, imm16};

endmodule
