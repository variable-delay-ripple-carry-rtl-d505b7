// tb_ccid_adder_core: the combinational CCID adder at 128/8/C=4 and 256/4/C=4.
// For every operand pair it checks the L-bit sum and carry, each CCID output
// (from the C-bit partial sums of the operands), and M_RL. M_RL is checked
// against a step-by-step settling model: in each step, the carry into a PA is
// known if the CCID below it is decisive or if the carry into the PA below was
// known in the step before; M_RL + 1 must equal the number of steps until every
// PA has a known carry-in. Operands include directed full-propagation cases and
// random pairs with b close to ~a so that long propagate runs occur.
module tb_ccid_adder_core;
  int checks = 0, failures = 0;

  localparam int unsigned L1 = 128, D1 = 8, C1 = 4, Q1 = L1 / D1;
  localparam int unsigned L2 = 256, D2 = 4, C2 = 4, Q2 = L2 / D2;

  logic [L1-1:0] a1, b1, s1;
  logic          ci1, co1, comp1;
  logic [D1-2:0] r1, gc1;
  logic [2:0]    mrl1, el1;

  logic [L2-1:0] a2, b2, s2;
  logic          ci2, co2, comp2;
  logic [D2-2:0] r2, gc2;
  logic [1:0]    mrl2, el2;

  ccid_adder_core #(.L(L1), .D(D1), .C(C1)) dut1 (
    .a(a1), .b(b1), .cin(ci1), .elapsed(el1), .sum(s1), .cout(co1),
    .r(r1), .group_carry(gc1), .mrl(mrl1), .completion(comp1));
  ccid_adder_core #(.L(L2), .D(D2), .C(C2)) dut2 (
    .a(a2), .b(b2), .cin(ci2), .elapsed(el2), .sum(s2), .cout(co2),
    .r(r2), .group_carry(gc2), .mrl(mrl2), .completion(comp2));

  int mrl_hist [8];

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Steps until all PA carry-ins are known; r_ref[d] tells whether CCID d decides.
  function automatic int settle_steps(logic [31:0] r_ref, int d_count);
    logic [32:0] known, next;
    int steps;
    known = 33'd1;               // the carry into PA 0 is the adder's carry-in
    steps = 1;
    for (int d = 0; d < d_count - 1; d++) if (r_ref[d]) known[d+1] = 1'b1;
    while ((known & ((33'd1 << d_count) - 1)) != ((33'd1 << d_count) - 1)) begin
      next = known;
      for (int d = 0; d < d_count - 1; d++) if (known[d]) next[d+1] = 1'b1;
      known = next;
      steps++;
    end
    return steps;
  endfunction

  task automatic check1(input logic [L1-1:0] ta, input logic [L1-1:0] tb_, input logic tci);
    logic [L1:0] exp_sum;
    logic [31:0] r_ref;
    int steps;
    a1 = ta; b1 = tb_; ci1 = tci; el1 = 3'($urandom_range(0, 7));
    #1;
    exp_sum = {1'b0, ta} + {1'b0, tb_} + (L1+1)'(tci);
    r_ref = '0;
    for (int d = 0; d < D1 - 1; d++) begin
      int gs;
      gs = int'(ta[d*Q1 + Q1 - C1 +: C1]) + int'(tb_[d*Q1 + Q1 - C1 +: C1]);
      r_ref[d] = (gs != 15);
      checks++;
      if (r1[d] !== r_ref[d] || (r_ref[d] && gc1[d] !== (gs > 15))) begin
        failures++;
        $display("FAIL 128/8 CCID %0d r=%0d gc=%0d group sum %0d", d, r1[d], gc1[d], gs);
      end
    end
    steps = settle_steps(r_ref, D1);
    mrl_hist[steps-1]++;
    checks++;
    if ({co1, s1} !== exp_sum) begin
      failures++;
      $display("FAIL 128/8 sum %h + %h + %0d = %h expected %h", ta, tb_, tci, {co1, s1}, exp_sum);
    end
    checks++;
    if (int'(mrl1) + 1 != steps || comp1 !== (int'(el1) + 1 >= steps)) begin
      failures++;
      $display("FAIL 128/8 mrl=%0d comp=%0d el=%0d, settling needs %0d cycles", mrl1, comp1, el1, steps);
    end
  endtask

  task automatic check2(input logic [L2-1:0] ta, input logic [L2-1:0] tb_, input logic tci);
    logic [L2:0] exp_sum;
    logic [31:0] r_ref;
    int steps;
    a2 = ta; b2 = tb_; ci2 = tci; el2 = 2'($urandom_range(0, 3));
    #1;
    exp_sum = {1'b0, ta} + {1'b0, tb_} + (L2+1)'(tci);
    r_ref = '0;
    for (int d = 0; d < D2 - 1; d++) begin
      int gs;
      gs = int'(ta[d*Q2 + Q2 - C2 +: C2]) + int'(tb_[d*Q2 + Q2 - C2 +: C2]);
      r_ref[d] = (gs != 15);
    end
    steps = settle_steps(r_ref, D2);
    checks++;
    if ({co2, s2} !== exp_sum || r2 !== r_ref[D2-2:0]) begin
      failures++;
      $display("FAIL 256/4 sum or CCID");
    end
    checks++;
    if (int'(mrl2) + 1 != steps || comp2 !== (int'(el2) + 1 >= steps)) begin
      failures++;
      $display("FAIL 256/4 mrl=%0d, settling needs %0d cycles", mrl2, steps);
    end
  endtask

  function automatic logic [L1-1:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [L2-1:0] rand256();
    return {rand128(), rand128()};
  endfunction

  initial begin
    logic [L1-1:0] x;
    logic [L2-1:0] y;
    // Full carry propagation through all PAs: every CCID sees 2^C - 1.
    check1('1, '0, 1'b1);
    check1('1, '0, 1'b0);
    check1('0, '1, 1'b1);
    check1('1, '1, 1'b1);
    check1('0, '0, 1'b0);
    check2('1, '0, 1'b1);
    check2('0, '0, 1'b0);
    for (int i = 0; i < 4000; i++) begin
      x = rand128();
      // b = ~a except at a few random places: long propagate runs.
      if (i % 2 == 0) check1(x, ~x ^ (rand128() & rand128() & rand128() & rand128()), 1'($urandom));
      else            check1(x, rand128(), 1'($urandom));
      y = rand256();
      if (i % 2 == 0) check2(y, ~y ^ (rand256() & rand256() & rand256() & rand256()), 1'($urandom));
      else            check2(y, rand256(), 1'($urandom));
    end
    for (int k = 0; k < 8; k++) $display("128/8: %0d additions needed %0d cycles", mrl_hist[k], k + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
