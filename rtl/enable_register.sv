// enable_register: N-bit register with a Write Enable input.
//
// On the rising clock edge Data Out takes Data In when Write Enable is 1
// and keeps its value when it is 0. It has no reset of its own: a user that
// needs an initial value (the PC) muxes it onto Data In. All storage in the
// processor is clocked by the same (rising) edge.
module enable_register #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (we) q <= d;
  end

endmodule
