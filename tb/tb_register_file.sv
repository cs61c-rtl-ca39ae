// tb_register_file: writes every register, then runs random mixes of
// writes and reads on both read ports against a model. Checks that reads
// are combinational, that a write lands only on the rising edge with Write
// Enable = 1, and that register 0 reads as zero whatever is written to it.
module tb_register_file;
  logic        clk = 0, we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file dut (.clk, .we, .rw, .ra, .rb, .busw, .busa, .busb);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int i = 0; i < 4; i++) begin
      ra = 5'($urandom); rb = 5'($urandom);
      #1;
      checks++;
      if (busa !== model[ra] || busb !== model[rb]) begin
        failures++;
        $display("FAIL R[%0d]=%h R[%0d]=%h expected %h %h", ra, busa, rb, busb,
                 model[ra], model[rb]);
      end
    end
  endtask

  initial begin
    model[0] = 0;
    we = 1;
    for (int r = 0; r < 32; r++) begin
      rw = 5'(r); busw = $urandom;
      @(posedge clk); #1;
      if (r != 0) model[r] = busw;
    end
    we = 0;
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r); rb = 5'(31 - r);
      #1;
      checks++;
      if (busa !== model[r] || busb !== model[31 - r]) begin
        failures++;
        $display("FAIL full read R%0d", r);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); rw = 5'($urandom); busw = $urandom;
      if (i % 10 == 0) rw = 0;
      check_reads();  // before the edge nothing has changed
      @(posedge clk); #1;
      if (we && rw != 0) model[rw] = busw;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
