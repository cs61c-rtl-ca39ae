// mux2: W-bit two-input multiplexer, y = sel ? b : a.
//
// Combinational. Used for the ALU source, register destination, write-back
// and next-PC selections of the datapath. Width defaults to 32 bits; which
// input is chosen by Select = 0 is this design's convention (A).
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  always_comb y = sel ? b : a;

endmodule
