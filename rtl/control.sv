// control: main decoder of the MIPS-lite single-cycle processor.
//
// Combinational. From op (instr[31:26]) and funct (instr[5:0]) it sets
// the datapath control points so that each instruction performs its
// register transfer:
//
//   instr  RegDst RegWr ExtOp ALUSrc ALUctr MemWr W_Src nPC_sel
//   addu     1     1     -     0     add     0     0     0
//   subu     1     1     -     0     sub     0     0     0
//   ori      0     1     0     1     or      0     0     0
//   lw       0     1     1     1     add     0     1     0
//   sw       -     0     1     1     add     1     -     0
//   beq      -     0     1     0     sub     0     -     1
//
// ("-" is a don't-care, driven to 0 here, except ExtOp = 1 for beq.) Any
// other encoding writes nothing and falls through to PC + 4; that handling
// of unsupported instructions is this design's choice.
module control
  import mips_lite_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{reg_dst: 1'b0, reg_wr: 1'b0, ext_op: 1'b0, alu_src: 1'b0,
             alu_ctr: ALU_ADD, mem_wr: 1'b0, w_src: 1'b0, branch: 1'b0};
    unique case (op)
      OP_RTYPE: begin
        if (funct == FN_ADDU) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = ALU_ADD;
        end else if (funct == FN_SUBU) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = ALU_SUB;
        end
      end
      OP_ORI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.ext_op  = 1'b0;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_ADD;
        ctrl.w_src   = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_ADD;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_ctr = ALU_SUB;
        ctrl.branch  = 1'b1;
      end
      default: ;
    endcase
  end

  // No instruction of the subset both writes memory and a register, or
  // writes a register and branches.
  always_comb begin
    assert (!(ctrl.mem_wr && ctrl.reg_wr) && !(ctrl.branch && ctrl.reg_wr))
      else $error("control: conflicting control word for op %h funct %h", op, funct);
  end

endmodule
