// tb_partial_adder: the 16-bit ripple-carry partial adder against integer
// addition, on corner cases (full carry propagation, all-ones, zero) and
// random operands.
module tb_partial_adder;
  localparam int unsigned Q = 16;
  logic [Q-1:0] a, b, s;
  logic ci, co;
  int checks = 0, failures = 0;

  partial_adder #(.Q(Q)) dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [Q-1:0] ta, input logic [Q-1:0] tb_, input logic tci);
    logic [Q:0] expected;
    a = ta; b = tb_; ci = tci;
    #1;
    expected = {1'b0, ta} + {1'b0, tb_} + (Q+1)'(tci);
    checks++;
    if ({co, s} !== expected) begin
      failures++;
      $display("FAIL %h + %h + %0d -> %h expected %h", ta, tb_, tci, {co, s}, expected);
    end
  endtask

  initial begin
    check('1, '0, 1'b1);          // carry runs through all Q stages
    check('1, '1, 1'b1);
    check('0, '0, 1'b0);
    check(16'h5555, 16'haaaa, 1'b1);
    check(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < 2000; i++) check(Q'($urandom), Q'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
