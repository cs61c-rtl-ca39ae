// mips_lite_cpu: single-cycle processor for the MIPS-lite subset
// (addu, subu, ori, lw, sw, beq).
//
// The top joins the datapath and its control. The datapath hands the
// instruction's op and funct fields to control; control returns the control
// word (RegDst, RegWr, ExtOp, ALUSrc, ALUctr, MemWr, W_Src, nPC_sel); the
// Equal condition stays inside the datapath, where the fetch unit uses it.
// Every instruction takes exactly one clock: it is fetched after one rising
// edge and its register, memory and PC writes happen on the next.
//
// Interface: clk; rst (synchronous, active high: holds PC at 0 and blocks
// register and memory writes); a program-load port into the instruction
// memory (prog_we, prog_addr as a word index, prog_data), used while rst is
// high; and observation outputs for the PC, the instruction, the register
// write-back bus and the data-memory store bus.
module mips_lite_cpu
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024,
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [31:0]    prog_data,
  output logic [31:0]    pc,
  output logic [31:0]    instr,
  output logic           reg_we,
  output logic [4:0]     reg_rw,
  output logic [31:0]    reg_busw,
  output logic           mem_we,
  output logic [31:0]    mem_addr,
  output logic [31:0]    mem_wdata
);

  ctrl_t ctrl;
  logic  equal_unused;

  control u_ctrl (.op(instr[31:26]), .funct(instr[5:0]), .ctrl(ctrl));

  datapath #(.IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH)) u_dp (
    .clk          (clk),
    .rst          (rst),
    .ctrl         (ctrl),
    .instr        (instr),
    .equal        (equal_unused),
    .prog_we      (prog_we),
    .prog_addr    (prog_addr),
    .prog_data    (prog_data),
    .dbg_pc       (pc),
    .dbg_reg_we   (reg_we),
    .dbg_rw       (reg_rw),
    .dbg_busw     (reg_busw),
    .dbg_mem_we   (mem_we),
    .dbg_mem_addr (mem_addr),
    .dbg_mem_wdata(mem_wdata)
  );

endmodule
