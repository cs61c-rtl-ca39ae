// tb_mips_lite_cpu: end-to-end test of the single-cycle MIPS-lite processor
// at its default sizes.
//
// Part 1 runs a small directed program (a count-down loop that sums 5+4+3+
// 2+1, stores the sum, loads it back and ORs in a zero-extended immediate)
// and checks the final registers, and that it reaches its halt loop after
// exactly 25 clocks: one instruction per clock. Part 2 fills the whole
// instruction memory with random MIPS-lite instructions (plus some
// unsupported encodings), runs them for many cycles and compares, every
// cycle, the PC, the register write-back bus and the data-memory store bus
// against an instruction-level reference model. The model starts from the
// processor's own initial register and memory contents, which are not
// reset. Every mechanism (each instruction, branch taken and not taken,
// negative sign-extended offsets, zero-extension of a high immediate, the
// discarded write to $0, unsupported encodings) must occur at least once.
module tb_mips_lite_cpu;
  import mips_ref_pkg::*;

  localparam int IDEPTH = 1024;
  localparam int DDEPTH = 1024;
  localparam int IAW    = $clog2(IDEPTH);
  localparam int NPROG  = 20;     // random programs
  localparam int NRAND  = 1000;   // cycles run per program

  logic           clk = 0;
  logic           rst;
  logic           prog_we;
  logic [IAW-1:0] prog_addr;
  logic [31:0]    prog_data;
  logic [31:0]    pc, instr, reg_busw, mem_addr, mem_wdata;
  logic           reg_we, mem_we;
  logic [4:0]     reg_rw;

  int checks = 0, failures = 0;
  int cnt [8];
  int cnt_neg_off = 0, cnt_ori_hi = 0, cnt_r0 = 0;
  int cycle = 0;

  mips_lite_cpu dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_data,
    .pc, .instr, .reg_we, .reg_rw, .reg_busw, .mem_we, .mem_addr, .mem_wdata
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    #(10 * (NPROG * (IDEPTH + NRAND + 10) + IDEPTH + 500));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Load a program through the program port while reset is held.
  task automatic load(ref logic [31:0] prog []);
    rst = 1;
    prog_we = 1;
    foreach (prog[i]) begin
      prog_addr = IAW'(i);
      prog_data = prog[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    @(posedge clk); #1;  // PC is 0 after this edge
  endtask

  logic [31:0] prog [];
  mips_iss     iss;
  effect_t     e;
  int          halt_cycles;

  initial begin
    rst = 1; prog_we = 0; prog_addr = '0; prog_data = '0;
    foreach (cnt[k]) cnt[k] = 0;

    // ---------------- Part 1: directed program ----------------
    prog = new[IDEPTH];
    foreach (prog[i]) prog[i] = enc_i(R_OP_BEQ, 0, 0, 16'hFFFF);  // halt loops
    prog[0]  = enc_i(R_OP_ORI, 1, 0, 16'd5);          // $1 = 5
    prog[1]  = enc_i(R_OP_ORI, 2, 0, 16'd0);          // $2 = 0
    prog[2]  = enc_i(R_OP_ORI, 3, 0, 16'd1);          // $3 = 1
    prog[3]  = enc_r(R_FN_ADDU, 2, 2, 1);             // loop: $2 += $1
    prog[4]  = enc_r(R_FN_SUBU, 1, 1, 3);             // $1 -= 1
    prog[5]  = enc_i(R_OP_BEQ, 0, 1, 16'd1);          // if $1 == 0 goto 28
    prog[6]  = enc_i(R_OP_BEQ, 0, 0, 16'hFFFC);       // goto loop (12)
    prog[7]  = enc_i(R_OP_SW, 2, 0, 16'h0040);        // MEM[0x40] = $2
    prog[8]  = enc_i(R_OP_LW, 4, 0, 16'h0040);        // $4 = MEM[0x40]
    prog[9]  = enc_i(R_OP_ORI, 5, 4, 16'h8000);       // $5 = $4 | 0x00008000
    prog[10] = enc_i(R_OP_BEQ, 0, 0, 16'hFFFF);       // halt: goto 40
    load(prog);
    rst = 0;
    halt_cycles = -1;
    for (int c = 0; c < 40; c++) begin
      if (pc == 32'd40 && halt_cycles < 0) halt_cycles = c;
      @(posedge clk); #1;
    end
    check(halt_cycles == 25, $sformatf("directed program took %0d cycles, expected 25", halt_cycles));
    check(dut.u_dp.u_rf.regs[2] == 32'd15, "sum $2 != 15");
    check(dut.u_dp.u_rf.regs[4] == 32'd15, "loaded $4 != 15");
    check(dut.u_dp.u_rf.regs[5] == 32'h0000_800F, "ori zero-extension: $5 != 0x800F");
    check(dut.u_dp.u_rf.regs[1] == 32'd0, "counter $1 != 0");
    check(dut.u_dp.u_dmem.mem[16] == 32'd15, "MEM[0x40] != 15");
    check(pc == 32'd40, "not parked at the halt loop");

    // ---------------- Part 2: random programs vs reference model ----------------
    for (int p = 0; p < NPROG; p++) begin
      iss = new(IDEPTH, DDEPTH);
      foreach (prog[i]) begin
        int          r;
        logic [4:0]  rs, rt, rd;
        logic [15:0] imm;
        rs = 5'($urandom_range(0, 7));
        rt = 5'($urandom_range(0, 7));
        rd = 5'($urandom_range(0, 7));
        imm = 16'($urandom);
        r = $urandom_range(0, 99);
        if      (r < 15) prog[i] = enc_r(R_FN_ADDU, rd, rs, rt);
        else if (r < 30) prog[i] = enc_r(R_FN_SUBU, rd, rs, rt);
        else if (r < 45) prog[i] = enc_i(R_OP_ORI, rt, rs, imm);
        else if (r < 60) prog[i] = enc_i(R_OP_LW, rt, rs, imm);
        else if (r < 75) prog[i] = enc_i(R_OP_SW, rt, rs, imm);
        else if (r < 85) prog[i] = enc_i(R_OP_BEQ, rs, rs, 16'($urandom_range(0, 8)));
        else if (r < 95) prog[i] = enc_i(R_OP_BEQ, rt, rs, 16'($urandom_range(0, 16) - 8));
        else if (r < 97) prog[i] = enc_r(6'h20, rd, rs, rt);          // add (not in subset)
        else             prog[i] = enc_i(6'h08, rt, rs, imm);         // addi (not in subset)
        iss.imem[i] = prog[i];
      end
      load(prog);
      // Reference starts from the processor's unreset register and memory state
      for (int i = 0; i < 32; i++) iss.regs[i] = dut.u_dp.u_rf.regs[i];
      for (int i = 0; i < DDEPTH; i++) iss.dmem[i] = dut.u_dp.u_dmem.mem[i];
      iss.pc = 0;
      rst = 0;
      for (int c = 0; c < NRAND; c++) begin
        @(negedge clk);
        check(pc == iss.pc, $sformatf("pc %h != ref %h", pc, iss.pc));
        e = iss.step();
        cnt[int'(e.kind)]++;
        if ((e.kind == K_LW || e.kind == K_SW) && instr[15]) cnt_neg_off++;
        if (e.kind == K_ORI && instr[15]) cnt_ori_hi++;
        if (e.reg_we && e.rw == 0) cnt_r0++;
        check(reg_we == e.reg_we, $sformatf("reg_we %0d != ref %0d at pc %h", reg_we, e.reg_we, iss.pc));
        if (e.reg_we)
          check(reg_rw == e.rw && reg_busw == e.wdata,
                $sformatf("write R%0d=%h != ref R%0d=%h", reg_rw, reg_busw, e.rw, e.wdata));
        check(mem_we == e.mem_we, $sformatf("mem_we %0d != ref %0d", mem_we, e.mem_we));
        if (e.mem_we)
          check(mem_addr == e.maddr && mem_wdata == e.mwdata,
                $sformatf("store [%h]=%h != ref [%h]=%h", mem_addr, mem_wdata, e.maddr, e.mwdata));
      end
      @(negedge clk);
      check(pc == iss.pc, "final pc");
      for (int i = 1; i < 32; i++)
        check(dut.u_dp.u_rf.regs[i] == iss.regs[i], $sformatf("final R%0d", i));
      for (int i = 0; i < DDEPTH; i++)
        check(dut.u_dp.u_dmem.mem[i] == iss.dmem[i], $sformatf("final MEM word %0d", i));
    end

    // Every mechanism must have happened
    foreach (cnt[k]) begin
      $display("count %-16s %0d", kind_e'(k), cnt[k]);
      check(cnt[k] > 0, $sformatf("%s never happened", kind_e'(k)));
    end
    $display("count negative offset    %0d", cnt_neg_off);
    $display("count ori high immediate %0d", cnt_ori_hi);
    $display("count write to $0        %0d", cnt_r0);
    check(cnt_neg_off > 0, "no negative load/store offset");
    check(cnt_ori_hi > 0, "no ori with imm16[15] set");
    check(cnt_r0 > 0, "no write to $0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
