// tb_max_runlength_detector: the run-length detector against a window search.
// For D = 8 (table form) every CCID vector and every cycle count is checked;
// for D = 16 (table form, 32768 entries) and D = 24 (logic form) random vectors
// plus all-zero and all-one vectors are checked. The reference M_RL is the
// largest k for which some window of k consecutive CCID results is all zero.
module tb_max_runlength_detector;
  int checks = 0, failures = 0;

  logic [6:0]  r8;
  logic [2:0]  el8, mrl8;
  logic        comp8;
  logic [14:0] r16;
  logic [3:0]  el16, mrl16;
  logic        comp16;
  logic [22:0] r24;
  logic [4:0]  el24, mrl24;
  logic        comp24;

  max_runlength_detector #(.D(8))  dut8  (.r(r8),  .elapsed(el8),  .mrl(mrl8),  .completion(comp8));
  max_runlength_detector #(.D(16)) dut16 (.r(r16), .elapsed(el16), .mrl(mrl16), .completion(comp16));
  max_runlength_detector #(.D(24)) dut24 (.r(r24), .elapsed(el24), .mrl(mrl24), .completion(comp24));

  // Largest k such that a window of k zeros exists in the low n bits of v.
  function automatic int ref_mrl(logic [31:0] v, int n);
    for (int k = n; k > 0; k--) begin
      for (int s = 0; s + k <= n; s++) begin
        logic [31:0] mask;
        mask = ((32'd1 << k) - 1) << s;
        if ((v & mask) == 0) return k;
      end
    end
    return 0;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [14:0] v);
    int e;
    r16 = v; el16 = 4'($urandom_range(0, 15));
    #1;
    e = ref_mrl(32'(v), 15);
    checks++;
    if (int'(mrl16) != e || comp16 !== (int'(el16) >= e)) begin
      failures++;
      $display("FAIL D=16 r=%b mrl=%0d expected %0d", v, mrl16, e);
    end
  endtask

  task automatic check24(input logic [22:0] v);
    int e;
    r24 = v; el24 = 5'($urandom_range(0, 23));
    #1;
    e = ref_mrl(32'(v), 23);
    checks++;
    if (int'(mrl24) != e || comp24 !== (int'(el24) >= e)) begin
      failures++;
      $display("FAIL D=24 r=%b mrl=%0d expected %0d", v, mrl24, e);
    end
  endtask

  initial begin
    for (int v = 0; v < 128; v++) begin
      for (int el = 0; el < 8; el++) begin
        int e;
        r8 = 7'(v); el8 = 3'(el);
        #1;
        e = ref_mrl(32'(v), 7);
        checks++;
        if (int'(mrl8) != e || comp8 !== (el >= e)) begin
          failures++;
          $display("FAIL D=8 r=%b el=%0d mrl=%0d comp=%0d expected %0d", v[6:0], el, mrl8, comp8, e);
        end
      end
    end
    check16('0); check16('1);
    check24('0); check24('1);
    for (int i = 0; i < 3000; i++) begin
      // Bias towards zeros so that long runs occur.
      check16(15'($urandom) & 15'($urandom));
      check24(23'($urandom) & 23'($urandom) & 23'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
