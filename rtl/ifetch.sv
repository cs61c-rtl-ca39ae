// ifetch: the instruction fetch unit.
//
// The PC register (an enable_register written every cycle) addresses the
// instruction memory, which returns the 32-bit instruction word in the same
// cycle. next_address_logic forms PC + 4 or the beq target from the
// instruction's own imm16, the branch control and the Equal condition, and
// the PC takes it on the rising clock edge. A synchronous reset loads
// RESET_PC (0) instead; the reset value is this design's choice.
//
// The instruction memory is read-only to the processor. Its write port is
// brought out as a program-load port (prog_we/prog_addr/prog_data, a word
// index) so that a program can be placed in it, normally while rst is high.
module ifetch #(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter logic [31:0] RESET_PC   = 32'd0,
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           branch,
  input  logic           equal,
  output logic [31:0]    pc,
  output logic [31:0]    instr,
  // program load
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [31:0]    prog_data
);

  logic [31:0] pc_plus4_unused;
  logic [31:0] next_pc;
  logic [31:0] pc_d;

  next_address_logic u_nal (
    .pc      (pc),
    .imm16   (instr[15:0]),
    .branch  (branch),
    .equal   (equal),
    .pc_plus4(pc_plus4_unused),
    .next_pc (next_pc)
  );

  mux2 #(.W(32)) u_rst_mux (.sel(rst), .a(next_pc), .b(RESET_PC), .y(pc_d));

  enable_register #(.N(32)) u_pc (.clk(clk), .we(1'b1), .d(pc_d), .q(pc));

  ideal_memory #(.W(32), .DEPTH(IMEM_DEPTH)) u_imem (
    .clk (clk),
    .we  (prog_we),
    .addr(prog_we ? prog_addr : pc[IAW+1:2]),
    .din (prog_data),
    .dout(instr)
  );

endmodule
