// tb_control: applies every op/funct pair (4096 combinations) and checks
// the control word against the MIPS-lite control table, field by field,
// ignoring only the don't-care fields of sw and beq. Encodings outside the
// subset must write neither registers nor memory and must not branch.
module tb_control;
  import mips_lite_pkg::*;
  logic [5:0] op, funct;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control dut (.op, .funct, .ctrl);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL op=%h funct=%h: %s", op, funct, what);
    end
  endtask

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        op = 6'(o); funct = 6'(f);
        #1;
        if (op == 6'h00 && funct == 6'h21) begin         // addu
          expect_eq(ctrl.reg_dst && ctrl.reg_wr && !ctrl.alu_src && ctrl.alu_ctr == ALU_ADD &&
                    !ctrl.mem_wr && !ctrl.w_src && !ctrl.branch, "addu");
        end else if (op == 6'h00 && funct == 6'h23) begin  // subu
          expect_eq(ctrl.reg_dst && ctrl.reg_wr && !ctrl.alu_src && ctrl.alu_ctr == ALU_SUB &&
                    !ctrl.mem_wr && !ctrl.w_src && !ctrl.branch, "subu");
        end else if (op == 6'h0D) begin                    // ori
          expect_eq(!ctrl.reg_dst && ctrl.reg_wr && !ctrl.ext_op && ctrl.alu_src &&
                    ctrl.alu_ctr == ALU_OR && !ctrl.mem_wr && !ctrl.w_src && !ctrl.branch,
                    "ori");
        end else if (op == 6'h23) begin                    // lw
          expect_eq(!ctrl.reg_dst && ctrl.reg_wr && ctrl.ext_op && ctrl.alu_src &&
                    ctrl.alu_ctr == ALU_ADD && !ctrl.mem_wr && ctrl.w_src && !ctrl.branch,
                    "lw");
        end else if (op == 6'h2B) begin                    // sw
          expect_eq(!ctrl.reg_wr && ctrl.ext_op && ctrl.alu_src && ctrl.alu_ctr == ALU_ADD &&
                    ctrl.mem_wr && !ctrl.branch, "sw");
        end else if (op == 6'h04) begin                    // beq
          expect_eq(!ctrl.reg_wr && !ctrl.alu_src && ctrl.alu_ctr == ALU_SUB &&
                    !ctrl.mem_wr && ctrl.branch, "beq");
        end else begin
          expect_eq(!ctrl.reg_wr && !ctrl.mem_wr && !ctrl.branch, "unsupported");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
