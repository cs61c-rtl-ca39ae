// tb_adder32: checks Sum and Carry of the 32-bit adder against a 33-bit
// reference sum, for corner values and random operands with both carry-in
// values.
module tb_adder32;
  logic [31:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  adder32 dut (.a, .b, .cin, .sum, .cout);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] ref_sum;
    a = x; b = y; cin = c;
    #1;
    ref_sum = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      $display("FAIL %h + %h + %b = %b%h, expected %h", x, y, c, cout, sum, ref_sum);
    end
  endtask

  initial begin
    try(32'hFFFF_FFFF, 32'd1, 1'b0);
    try(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    try(32'd0, 32'd0, 1'b1);
    try(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int i = 0; i < 2000; i++) try($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
