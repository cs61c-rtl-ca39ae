// datapath: the single-cycle MIPS-lite datapath, everything but control.
//
// One instruction completes per clock. Within a cycle: the PC addresses the
// instruction memory (ifetch); rs and rt address the register file's busA
// and busB; the extender widens imm16 (zero- or sign-, by ExtOp); the ALUSrc
// mux chooses busB or the immediate as the ALU's B input; the ALU result is
// the data memory address and, for addu/subu/ori, the value written back;
// the W_Src mux chooses the ALU result or the memory word (lw) for busW;
// the RegDst mux chooses rd or rt as the register written. Data In of the
// data memory is busB, so sw stores R[rt]. The register file, data memory
// and PC are all written on the same rising clock edge that ends the cycle.
// For beq the ALU subtracts and its Zero output is the Equal condition
// returned to the fetch unit (and brought out for control).
//
// Memory addresses are byte addresses; the memories are word-addressed by
// bits [AW+1:2] (word alignment is assumed, the low two bits are ignored).
// The dbg_* outputs expose the write-back and store buses for observation.
module datapath
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024,
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH),
  localparam int unsigned DAW       = $clog2(DMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  input  ctrl_t          ctrl,
  output logic [31:0]    instr,
  output logic           equal,
  // program load into the instruction memory
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [31:0]    prog_data,
  // observation
  output logic [31:0]    dbg_pc,
  output logic           dbg_reg_we,
  output logic [4:0]     dbg_rw,
  output logic [31:0]    dbg_busw,
  output logic           dbg_mem_we,
  output logic [31:0]    dbg_mem_addr,
  output logic [31:0]    dbg_mem_wdata
);

  logic [4:0]  rs, rt, rd;
  logic [4:0]  rw;
  logic [31:0] busa, busb, busw;
  logic [31:0] imm32, alu_b, alu_result, mem_dout;
  logic        reg_we, mem_we;

  assign rs = instr[25:21];
  assign rt = instr[20:16];
  assign rd = instr[15:11];

  // Writes are held off during reset
  assign reg_we = ctrl.reg_wr & ~rst;
  assign mem_we = ctrl.mem_wr & ~rst;

  ifetch #(.IMEM_DEPTH(IMEM_DEPTH)) u_ifetch (
    .clk      (clk),
    .rst      (rst),
    .branch   (ctrl.branch),
    .equal    (equal),
    .pc       (dbg_pc),
    .instr    (instr),
    .prog_we  (prog_we),
    .prog_addr(prog_addr),
    .prog_data(prog_data)
  );

  mux2 #(.W(5)) u_regdst (.sel(ctrl.reg_dst), .a(rt), .b(rd), .y(rw));

  register_file #(.NREGS(32), .W(32)) u_rf (
    .clk (clk),
    .we  (reg_we),
    .rw  (rw),
    .ra  (rs),
    .rb  (rt),
    .busw(busw),
    .busa(busa),
    .busb(busb)
  );

  extender u_ext (.ext_op(ctrl.ext_op), .imm16(instr[15:0]), .imm32(imm32));

  mux2 #(.W(32)) u_alusrc (.sel(ctrl.alu_src), .a(busb), .b(imm32), .y(alu_b));

  alu u_alu (
    .a      (busa),
    .b      (alu_b),
    .alu_ctr(ctrl.alu_ctr),
    .result (alu_result),
    .zero   (equal)
  );

  ideal_memory #(.W(32), .DEPTH(DMEM_DEPTH)) u_dmem (
    .clk (clk),
    .we  (mem_we),
    .addr(alu_result[DAW+1:2]),
    .din (busb),
    .dout(mem_dout)
  );

  mux2 #(.W(32)) u_wsrc (.sel(ctrl.w_src), .a(alu_result), .b(mem_dout), .y(busw));

  assign dbg_reg_we    = reg_we;
  assign dbg_rw        = rw;
  assign dbg_busw      = busw;
  assign dbg_mem_we    = mem_we;
  assign dbg_mem_addr  = alu_result;
  assign dbg_mem_wdata = busb;

endmodule
