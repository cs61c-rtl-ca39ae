// tb_next_address_logic: checks PC + 4 and the next PC for random PCs and
// immediates: the branch target PC + 4 + SignExt(imm16) x 4 only when both
// branch and Equal are 1, PC + 4 in the other three cases.
module tb_next_address_logic;
  logic [31:0] pc, pc_plus4, next_pc, expected;
  logic [15:0] imm16;
  logic        branch, equal;
  int checks = 0, failures = 0;
  int taken = 0;

  next_address_logic dut (.pc, .imm16, .branch, .equal, .pc_plus4, .next_pc);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      pc = {$urandom} & ~32'd3; imm16 = 16'($urandom);
      branch = 1'(i); equal = 1'(i >> 1);
      #1;
      expected = pc + 32'd4;
      if (branch && equal) begin
        expected = pc + 32'd4 + (32'($signed(imm16)) * 4);
        taken++;
      end
      checks++;
      if (next_pc !== expected || pc_plus4 !== pc + 32'd4) begin
        failures++;
        $display("FAIL pc=%h imm=%h br=%b eq=%b -> %h expected %h", pc, imm16, branch,
                 equal, next_pc, expected);
      end
    end
    checks++;
    if (taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
