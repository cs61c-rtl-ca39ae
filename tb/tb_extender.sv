// tb_extender: checks zero extension (ExtOp = 0) and sign extension
// (ExtOp = 1) of 16-bit immediates, including 0x7FFF, 0x8000 and 0xFFFF.
module tb_extender;
  logic        ext_op;
  logic [15:0] imm16;
  logic [31:0] imm32, expected;
  int checks = 0, failures = 0;

  extender dut (.ext_op, .imm16, .imm32);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic op, logic [15:0] v);
    ext_op = op; imm16 = v;
    #1;
    expected = op ? 32'($signed(v)) : 32'(v);
    checks++;
    if (imm32 !== expected) begin
      failures++;
      $display("FAIL ext_op=%b imm=%h -> %h expected %h", op, v, imm32, expected);
    end
  endtask

  initial begin
    try(0, 16'h7FFF); try(1, 16'h7FFF);
    try(0, 16'h8000); try(1, 16'h8000);
    try(0, 16'hFFFF); try(1, 16'hFFFF);
    for (int i = 0; i < 1000; i++) try(1'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
