// adder32: W-bit binary adder with carry in and carry out.
//
// Sum = A + B + CarryIn, Carry is the carry out of the top bit. Purely
// combinational. The ports are those of the adder building block of the
// single-cycle datapath; the width defaults to the 32 bits of the datapath.
// How the sum is formed inside (here one behavioural addition) is left to
// synthesis.
module adder32 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  always_comb begin
    {cout, sum} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
  end

endmodule
