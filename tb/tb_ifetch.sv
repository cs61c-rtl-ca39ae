// tb_ifetch: loads random instruction words through the program port,
// releases reset and then, each cycle, drives random branch/Equal values.
// Checks that the PC starts at 0, that the instruction word is the memory
// word at PC (read in the same cycle), and that the PC moves to PC + 4, or
// to PC + 4 + SignExt(imm16) x 4 when branch and Equal are both 1, on every
// clock. Branch offsets are kept small so the PC wanders over the memory.
module tb_ifetch;
  localparam int DEPTH = 1024;
  localparam int AW    = $clog2(DEPTH);
  logic          clk = 0, rst, branch, equal, prog_we;
  logic [AW-1:0] prog_addr;
  logic [31:0]   prog_data, pc, instr, model_pc;
  logic [31:0]   words [DEPTH];
  int checks = 0, failures = 0, taken = 0;

  ifetch dut (.clk, .rst, .branch, .equal, .pc, .instr, .prog_we, .prog_addr, .prog_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1; branch = 0; equal = 0; prog_we = 1;
    for (int i = 0; i < DEPTH; i++) begin
      words[i] = {$urandom} & 32'hFFFF_0000 | 32'(16'($urandom_range(0, 40) - 20));
      prog_addr = AW'(i); prog_data = words[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    @(posedge clk); #1;
    rst = 0;
    model_pc = 0;
    for (int c = 0; c < 5000; c++) begin
      branch = 1'($urandom); equal = 1'($urandom);
      #1;
      check(pc == model_pc, $sformatf("pc %h expected %h", pc, model_pc));
      check(instr == words[model_pc[AW+1:2]], $sformatf("instr at %h", pc));
      if (branch && equal) begin
        model_pc = model_pc + 4 + (32'($signed(words[model_pc[AW+1:2]][15:0])) << 2);
        taken++;
      end else begin
        model_pc = model_pc + 4;
      end
      @(posedge clk); #1;
    end
    // Synchronous reset brings the PC back to 0
    rst = 1;
    @(posedge clk); #1;
    check(pc == 0, "reset to 0");
    check(taken > 0, "no branch taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
