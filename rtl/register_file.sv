// register_file: 32 x 32-bit register file with two read ports and one
// write port.
//
// Ra selects the register driven onto busA and Rb the one driven onto busB;
// both reads are combinational (the clock plays no part in a read). On the
// rising clock edge, when Write Enable is 1, busW is written into register
// Rw. Register 0 always reads as zero and writes to it are dropped, as the
// MIPS architecture defines for $zero; that rule is this design's addition.
// A read of the register being written in the same cycle returns the old
// value; the new one appears after the edge. Registers are not reset.
module register_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] rw,
  input  logic [AW-1:0] ra,
  input  logic [AW-1:0] rb,
  input  logic [W-1:0]  busw,
  output logic [W-1:0]  busa,
  output logic [W-1:0]  busb
);

  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && rw != '0) regs[rw] <= busw;
  end

  assign busa = (ra == '0) ? '0 : regs[ra];
  assign busb = (rb == '0) ? '0 : regs[rb];

endmodule
