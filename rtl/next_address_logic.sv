// next_address_logic: computes the address of the next instruction.
//
// PC + 4 always comes from one adder32. A second adder32 adds the
// sign-extended immediate shifted left by two (imm16 x 4) to PC + 4, giving
// the branch target. When branch (nPC_sel) and Equal are both 1 the target
// is chosen, otherwise PC + 4:
//   PC' = PC + 4 + SignExt(imm16) x 4   if beq and R[rs] == R[rt]
//   PC' = PC + 4                        otherwise
// Combinational. Building it from two adders, an extender and a mux is this
// design's reading of the instruction-fetch diagram.
module next_address_logic (
  input  logic [31:0] pc,
  input  logic [15:0] imm16,
  input  logic        branch,
  input  logic        equal,
  output logic [31:0] pc_plus4,
  output logic [31:0] next_pc
);

  logic [31:0] imm32;
  logic [31:0] target;
  logic        c0_unused, c1_unused;

  adder32 #(.W(32)) u_inc (
    .a(pc), .b(32'd4), .cin(1'b0), .sum(pc_plus4), .cout(c0_unused)
  );

  extender u_sext (.ext_op(1'b1), .imm16(imm16), .imm32(imm32));

  adder32 #(.W(32)) u_tgt (
    .a(pc_plus4), .b({imm32[29:0], 2'b00}), .cin(1'b0), .sum(target),
    .cout(c1_unused)
  );

  mux2 #(.W(32)) u_sel (
    .sel(branch & equal), .a(pc_plus4), .b(target), .y(next_pc)
  );

endmodule
