// mips_ref_pkg: instruction-level reference model and encoders used by the
// processor testbenches.
//
// The model executes MIPS-lite (addu, subu, ori, lw, sw, beq) one
// instruction at a time straight from the architectural definition
// (R[rd] = R[rs] + R[rt], PC = PC + 4 + SignExt(imm16) x 4 when taken, and
// so on), with $0 fixed at zero and any other encoding doing nothing but
// PC = PC + 4. Memories are word arrays indexed by address bits [AW+1:2]
// and wrap, matching the documented addressing of the RTL memories. It
// shares no code with the RTL; the opcode values are written out again.
package mips_ref_pkg;

  localparam logic [5:0] R_OP_RTYPE = 6'h00, R_OP_ORI = 6'h0D, R_OP_LW = 6'h23,
                         R_OP_SW = 6'h2B, R_OP_BEQ = 6'h04;
  localparam logic [5:0] R_FN_ADDU = 6'h21, R_FN_SUBU = 6'h23;

  typedef enum int {
    K_ADDU, K_SUBU, K_ORI, K_LW, K_SW, K_BEQ_TAKEN, K_BEQ_NOT_TAKEN, K_OTHER
  } kind_e;

  typedef struct {
    kind_e       kind;
    bit          reg_we;
    logic [4:0]  rw;
    logic [31:0] wdata;
    bit          mem_we;
    logic [31:0] maddr;
    logic [31:0] mwdata;
    logic [31:0] next_pc;
  } effect_t;

  function automatic logic [31:0] enc_r(logic [5:0] funct, logic [4:0] rd,
                                        logic [4:0] rs, logic [4:0] rt);
    return {R_OP_RTYPE, rs, rt, rd, 5'd0, funct};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, logic [4:0] rt,
                                        logic [4:0] rs, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  class mips_iss;
    logic [31:0] regs [32];
    logic [31:0] imem [];
    logic [31:0] dmem [];
    logic [31:0] pc;
    int          iaw, daw;

    function new(int idepth, int ddepth);
      imem = new[idepth];
      dmem = new[ddepth];
      iaw  = $clog2(idepth);
      daw  = $clog2(ddepth);
      pc   = 0;
      foreach (regs[i]) regs[i] = 0;
      foreach (imem[i]) imem[i] = 0;
      foreach (dmem[i]) dmem[i] = 0;
    endfunction

    function int iidx(logic [31:0] a);
      return int'((a >> 2) & ((32'd1 << iaw) - 1));
    endfunction

    function int didx(logic [31:0] a);
      return int'((a >> 2) & ((32'd1 << daw) - 1));
    endfunction

    function logic [31:0] rd_reg(logic [4:0] r);
      return (r == 0) ? 32'd0 : regs[r];
    endfunction

    // Execute the instruction at pc; update state and report what it did.
    function effect_t step();
      effect_t     e;
      logic [31:0] ins, a, b, simm, zimm, ea;
      logic [5:0]  op, fn;
      logic [4:0]  rs, rt, rd;
      ins  = imem[iidx(pc)];
      op   = ins[31:26]; rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
      fn   = ins[5:0];
      a    = rd_reg(rs);
      b    = rd_reg(rt);
      simm = {{16{ins[15]}}, ins[15:0]};
      zimm = {16'd0, ins[15:0]};
      e.kind = K_OTHER; e.reg_we = 0; e.rw = 0; e.wdata = 0;
      e.mem_we = 0; e.maddr = 0; e.mwdata = 0;
      e.next_pc = pc + 4;
      if (op == R_OP_RTYPE && fn == R_FN_ADDU) begin
        e.kind = K_ADDU; e.reg_we = 1; e.rw = rd; e.wdata = a + b;
      end else if (op == R_OP_RTYPE && fn == R_FN_SUBU) begin
        e.kind = K_SUBU; e.reg_we = 1; e.rw = rd; e.wdata = a - b;
      end else if (op == R_OP_ORI) begin
        e.kind = K_ORI; e.reg_we = 1; e.rw = rt; e.wdata = a | zimm;
      end else if (op == R_OP_LW) begin
        ea = a + simm;
        e.kind = K_LW; e.reg_we = 1; e.rw = rt; e.wdata = dmem[didx(ea)];
      end else if (op == R_OP_SW) begin
        ea = a + simm;
        e.kind = K_SW; e.mem_we = 1; e.maddr = ea; e.mwdata = b;
        dmem[didx(ea)] = b;
      end else if (op == R_OP_BEQ) begin
        if (a == b) begin
          e.kind = K_BEQ_TAKEN; e.next_pc = pc + 4 + (simm << 2);
        end else begin
          e.kind = K_BEQ_NOT_TAKEN;
        end
      end
      if (e.reg_we && e.rw != 0) regs[e.rw] = e.wdata;
      pc = e.next_pc;
      return e;
    endfunction
  endclass

endpackage
