// tb_alu: checks every ALU operation (add, subtract, OR, AND, signed
// set-less-than) and the Zero output against reference arithmetic, with
// random operands, equal operands (Zero after subtract is the == test) and
// sign/overflow corner cases for set-less-than.
module tb_alu;
  import mips_lite_pkg::*;
  logic [31:0] a, b, result, expected;
  alu_ctr_e    alu_ctr;
  logic        zero;
  int checks = 0, failures = 0;
  int zero_seen = 0;

  alu dut (.a, .b, .alu_ctr, .result, .zero);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(alu_ctr_e op, logic [31:0] x, logic [31:0] y);
    a = x; b = y; alu_ctr = op;
    #1;
    case (op)
      ALU_ADD: expected = x + y;
      ALU_SUB: expected = x - y;
      ALU_OR:  expected = x | y;
      ALU_AND: expected = x & y;
      ALU_SLT: expected = ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      default: expected = 'x;
    endcase
    checks++;
    if (result !== expected || zero !== (expected == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h -> %h z=%b expected %h", op.name(), x, y, result,
               zero, expected);
    end
    if (zero) zero_seen++;
  endtask

  initial begin
    alu_ctr_e ops [5] = '{ALU_ADD, ALU_SUB, ALU_OR, ALU_AND, ALU_SLT};
    logic [31:0] v;
    foreach (ops[k]) begin
      for (int i = 0; i < 500; i++) try(ops[k], $urandom, $urandom);
      v = $urandom;
      try(ops[k], v, v);
      try(ops[k], 32'h8000_0000, 32'h7FFF_FFFF);
      try(ops[k], 32'h7FFF_FFFF, 32'h8000_0000);
      try(ops[k], 32'hFFFF_FFFF, 32'd1);
      try(ops[k], 32'd0, 32'd0);
    end
    checks++;
    if (zero_seen == 0) begin
      failures++;
      $display("FAIL Zero never asserted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
