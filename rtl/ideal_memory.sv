// ideal_memory: idealized word memory with one address, a Data In bus and
// a Data Out bus.
//
// The address selects the word put on Data Out; reading is combinational
// (Data Out follows the address after the access time, here at once). When
// Write Enable is 1, the word at the address is replaced by Data In on the
// rising clock edge: the clock matters only for writes. The address is a
// word index of AW bits; the user drops the two byte-offset bits of a byte
// address, and addresses above DEPTH-1 wrap. DEPTH (1024 words, 4 KiB) is
// this design's choice. Contents are not reset. The processor uses one
// instance as instruction memory and one as data memory.
module ideal_memory #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
  end

  assign dout = mem[addr];

endmodule
