// tb_datapath: tests the datapath on its own, with the control word worked
// out in this testbench from the instruction it fetches (not by the control
// block). Random MIPS-lite programs are loaded and run; every cycle the PC,
// the register write-back bus and the data-memory store bus are compared
// with an instruction-level reference model, and Equal is checked against
// R[rs] == R[rt] for each beq. Small memories keep the run short.
module tb_datapath;
  import mips_lite_pkg::*;
  import mips_ref_pkg::*;

  localparam int IDEPTH = 64;
  localparam int DDEPTH = 64;
  localparam int IAW    = $clog2(IDEPTH);
  localparam int NPROG  = 10;
  localparam int NRUN   = 300;

  logic           clk = 0, rst, prog_we, equal;
  logic [IAW-1:0] prog_addr;
  logic [31:0]    prog_data, instr, pc, busw, maddr, mwdata;
  logic           reg_we, mem_we;
  logic [4:0]     rw;
  ctrl_t          ctrl;
  int checks = 0, failures = 0, n_taken = 0, n_lw = 0;

  datapath #(.IMEM_DEPTH(IDEPTH), .DMEM_DEPTH(DDEPTH)) dut (
    .clk, .rst, .ctrl, .instr, .equal, .prog_we, .prog_addr, .prog_data,
    .dbg_pc(pc), .dbg_reg_we(reg_we), .dbg_rw(rw), .dbg_busw(busw),
    .dbg_mem_we(mem_we), .dbg_mem_addr(maddr), .dbg_mem_wdata(mwdata)
  );

  always #5 clk = ~clk;

  // Control word written out per instruction, independently of the control block
  always_comb begin
    ctrl = '{reg_dst: 0, reg_wr: 0, ext_op: 0, alu_src: 0, alu_ctr: ALU_ADD,
             mem_wr: 0, w_src: 0, branch: 0};
    case (instr[31:26])
      6'h00: begin
        ctrl.reg_dst = 1;
        ctrl.reg_wr  = (instr[5:0] == 6'h21) || (instr[5:0] == 6'h23);
        ctrl.alu_ctr = (instr[5:0] == 6'h23) ? ALU_SUB : ALU_ADD;
      end
      6'h0D: begin ctrl.reg_wr = 1; ctrl.alu_src = 1; ctrl.alu_ctr = ALU_OR; end
      6'h23: begin ctrl.reg_wr = 1; ctrl.ext_op = 1; ctrl.alu_src = 1; ctrl.w_src = 1; end
      6'h2B: begin ctrl.mem_wr = 1; ctrl.ext_op = 1; ctrl.alu_src = 1; end
      6'h04: begin ctrl.alu_ctr = ALU_SUB; ctrl.branch = 1; end
      default: ;
    endcase
  end

  initial begin : watchdog
    #(10 * NPROG * (IDEPTH + NRUN + 10) + 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t %s", $time, what); end
  endtask

  mips_iss iss;
  effect_t e;

  initial begin
    rst = 1; prog_we = 0; prog_addr = '0; prog_data = '0;
    for (int p = 0; p < NPROG; p++) begin
      iss = new(IDEPTH, DDEPTH);
      rst = 1; prog_we = 1;
      for (int i = 0; i < IDEPTH; i++) begin
        logic [4:0] rs, rt, rd;
        int r;
        rs = 5'($urandom_range(0, 5)); rt = 5'($urandom_range(0, 5));
        rd = 5'($urandom_range(0, 5));
        r = $urandom_range(0, 5);
        case (r)
          0: iss.imem[i] = enc_r(R_FN_ADDU, rd, rs, rt);
          1: iss.imem[i] = enc_r(R_FN_SUBU, rd, rs, rt);
          2: iss.imem[i] = enc_i(R_OP_ORI, rt, rs, 16'($urandom));
          3: iss.imem[i] = enc_i(R_OP_LW, rt, rs, 16'($urandom));
          4: iss.imem[i] = enc_i(R_OP_SW, rt, rs, 16'($urandom));
          default: iss.imem[i] = enc_i(R_OP_BEQ, ($urandom_range(0, 1) == 1) ? rs : rt, rs,
                                       16'($urandom_range(0, 6)));
        endcase
        prog_addr = IAW'(i); prog_data = iss.imem[i];
        @(posedge clk); #1;
      end
      prog_we = 0;
      @(posedge clk); #1;
      for (int i = 0; i < 32; i++) iss.regs[i] = dut.u_rf.regs[i];
      for (int i = 0; i < DDEPTH; i++) iss.dmem[i] = dut.u_dmem.mem[i];
      iss.pc = 0;
      rst = 0;
      for (int c = 0; c < NRUN; c++) begin
        @(negedge clk);
        check(pc == iss.pc, $sformatf("pc %h != %h", pc, iss.pc));
        if (instr[31:26] == 6'h04)
          check(equal == (iss.rd_reg(instr[25:21]) == iss.rd_reg(instr[20:16])), "Equal");
        e = iss.step();
        if (e.kind == K_BEQ_TAKEN) n_taken++;
        if (e.kind == K_LW) n_lw++;
        check(reg_we == e.reg_we && (!e.reg_we || (rw == e.rw && busw == e.wdata)),
              $sformatf("write-back R%0d=%h expected R%0d=%h", rw, busw, e.rw, e.wdata));
        check(mem_we == e.mem_we && (!e.mem_we || (maddr == e.maddr && mwdata == e.mwdata)),
              "store");
      end
    end
    check(n_taken > 0 && n_lw > 0, "taken branch and load both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
