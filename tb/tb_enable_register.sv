// tb_enable_register: drives random Data In and Write Enable each clock and
// checks that Data Out loads on the rising edge only when Write Enable is 1
// and holds otherwise.
module tb_enable_register;
  logic        clk = 0, we;
  logic [31:0] d, q, model;
  int checks = 0, failures = 0;

  enable_register #(.N(32)) dut (.clk, .we, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1; d = 32'h1234_5678;
    @(posedge clk); #1;
    model = 32'h1234_5678;
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom); d = $urandom;
      #3;
      checks++;  // no change before the edge
      if (q !== model) begin failures++; $display("FAIL q changed before the edge"); end
      @(posedge clk); #1;
      if (we) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL we=%b d=%h q=%h expected %h", we, d, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
