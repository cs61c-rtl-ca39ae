// tb_ideal_memory: writes random words at random addresses (Write Enable
// random) and checks, against a model, that Data Out follows the address
// combinationally, that a write happens only on the rising edge with Write
// Enable = 1, and that all DEPTH words hold independent values.
module tb_ideal_memory;
  localparam int DEPTH = 1024;
  localparam int AW    = $clog2(DEPTH);
  logic          clk = 0, we;
  logic [AW-1:0] addr;
  logic [31:0]   din, dout;
  logic [31:0]   model [DEPTH];
  int checks = 0, failures = 0;

  ideal_memory dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int i = 0; i < DEPTH; i++) begin
      addr = AW'(i); din = $urandom; model[i] = din;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      addr = AW'(i);
      #1;
      checks++;
      if (dout !== model[i]) begin failures++; $display("FAIL read %0d", i); end
    end
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); addr = AW'($urandom); din = $urandom;
      #1;
      checks++;  // combinational read of the old contents before the edge
      if (dout !== model[addr]) begin failures++; $display("FAIL pre-edge read %0d", addr); end
      @(posedge clk); #1;
      if (we) model[addr] = din;
      checks++;
      if (dout !== model[addr]) begin failures++; $display("FAIL post-edge read %0d", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
