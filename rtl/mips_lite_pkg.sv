// mips_lite_pkg: types and constants shared by the MIPS-lite single-cycle
// processor.
//
// The subset is the six instructions addu, subu, ori, lw, sw and beq, in the
// standard MIPS R-type and I-type formats (op[31:26], rs[25:21], rt[20:16],
// rd[15:11], shamt[10:6], funct[5:0]; or op, rs, rt, imm16[15:0]). The field
// layout follows the MIPS format. The numeric opcode and funct values are
// the standard MIPS encodings. The ALU control encoding and the packing of
// the control word are this design's own choice.
package mips_lite_pkg;

  localparam int unsigned RIDX = 5;   // register specifier width

  // Primary opcodes (instr[31:26])
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;
  localparam logic [5:0] OP_BEQ   = 6'h04;

  // R-type function codes (instr[5:0])
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUBU  = 6'h23;

  // ALU operation select (ALUctr)
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_OR  = 3'd2,
    ALU_AND = 3'd3,
    ALU_SLT = 3'd4
  } alu_ctr_e;

  // Control points of the single-cycle datapath
  typedef struct packed {
    logic     reg_dst;  // RegDst: 1 = write rd, 0 = write rt
    logic     reg_wr;   // RegWr: write busW into R[Rw] at the clock edge
    logic     ext_op;   // ExtOp: 1 = sign-extend imm16, 0 = zero-extend
    logic     alu_src;  // ALUSrc: 1 = ALU B input is the extended immediate
    alu_ctr_e alu_ctr;  // ALUctr
    logic     mem_wr;   // MemWr: write data memory at the clock edge
    logic     w_src;    // W_Src: 1 = busW from data memory, 0 = from ALU
    logic     branch;   // nPC_sel: 1 = beq, take the target if Equal
  } ctrl_t;

  // Instruction field views
  typedef struct packed {
    logic [5:0]      op;
    logic [RIDX-1:0] rs;
    logic [RIDX-1:0] rt;
    logic [RIDX-1:0] rd;
    logic [4:0]      shamt;
    logic [5:0]      funct;
  } rtype_t;

  typedef struct packed {
    logic [5:0]      op;
    logic [RIDX-1:0] rs;
    logic [RIDX-1:0] rt;
    logic [15:0]     imm16;
  } itype_t;

endpackage
