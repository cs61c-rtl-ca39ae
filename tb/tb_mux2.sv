// tb_mux2: checks that the multiplexer passes A when Select is 0 and B when
// it is 1, for random data.
module tb_mux2;
  logic        sel;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  mux2 dut (.sel, .a, .b, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; b = $urandom; sel = 1'(i & 1);
      #1;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
