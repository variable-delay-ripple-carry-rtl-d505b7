// tb_ccid: exhaustive check of the carry chain interrupt detector for C = 4 and
// C = 2. The reference follows the definition: add the two C-bit slices; the
// carry out of the group is fixed (r = 1) unless the sum is exactly 2^C - 1,
// and it is 1 when the sum exceeds 2^C - 1.
module tb_ccid;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4;
  logic       r4, c4;
  logic [1:0] a2, b2;
  logic       r2, c2;

  ccid #(.C(4)) dut4 (.a(a4), .b(b4), .r(r4), .carry(c4));
  ccid #(.C(2)) dut2 (.a(a2), .b(b2), .r(r2), .carry(c2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int propagating4 = 0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (r4 !== (i + j != 15)) begin
          failures++;
          $display("FAIL C=4 r a=%0d b=%0d r=%0d", i, j, r4);
        end
        if (i + j == 15) propagating4++;
        if (i + j != 15) begin
          checks++;
          if (c4 !== (i + j > 15)) begin
            failures++;
            $display("FAIL C=4 carry a=%0d b=%0d carry=%0d", i, j, c4);
          end
        end
      end
    end
    // 1/2^C of all operand pairs must let the carry through.
    checks++;
    if (propagating4 != 16) failures++;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a2 = 2'(i); b2 = 2'(j);
        #1;
        checks++;
        if (r2 !== (i + j != 3)) begin
          failures++;
          $display("FAIL C=2 r a=%0d b=%0d r=%0d", i, j, r2);
        end
        if (i + j != 3) begin
          checks++;
          if (c2 !== (i + j > 3)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
