// tb_full_adder: exhaustive check of the one-bit full adder against the integer
// sum a + b + ci, all eight input combinations.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int total;
      {a, b, ci} = 3'(i);
      #1;
      total = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
