// ccid_workload_point: measures one CCID adder configuration (L, D, C) on
// uniformly random operands. It drives N_SAMPLES operand pairs into a
// combinational ccid_adder_core, checks sum and M_RL of each against its own
// reference, and reports the sample mean and variance of the cycle count
// M_RL + 1. Used by tb_ccid_workloads; `finished` rises when it is done.
module ccid_workload_point #(
  parameter int unsigned L         = 128,
  parameter int unsigned D         = 8,
  parameter int unsigned C         = 4,
  parameter int unsigned N_SAMPLES = 4000
) (
  output logic finished,
  output real  mean_cycles,
  output real  var_cycles,
  output int   checks,
  output int   failures
);
  localparam int unsigned Q  = L / D;
  localparam int unsigned MW = (D > 2) ? $clog2(D) : 1;

  logic [L-1:0]  a, b, s;
  logic          ci, co, comp;
  logic [D-2:0]  r, gc;
  logic [MW-1:0] mrl;

  ccid_adder_core #(.L(L), .D(D), .C(C)) dut (
    .a(a), .b(b), .cin(ci), .elapsed('0), .sum(s), .cout(co),
    .r(r), .group_carry(gc), .mrl(mrl), .completion(comp));

  function automatic logic [L-1:0] rand_word();
    logic [L-1:0] w;
    for (int i = 0; i < L; i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    real sum1, sum2;
    finished = 1'b0; checks = 0; failures = 0;
    sum1 = 0.0; sum2 = 0.0;
    mean_cycles = 0.0; var_cycles = 0.0;
    for (int n = 0; n < N_SAMPLES; n++) begin
      logic [L:0] exp_sum;
      int run, best, cyc;
      a = rand_word(); b = rand_word(); ci = 1'($urandom);
      #1;
      exp_sum = {1'b0, a} + {1'b0, b} + (L+1)'(ci);
      run = 0; best = 0;
      for (int d = 0; d < D - 1; d++) begin
        if (int'(a[d*Q + Q - C +: C]) + int'(b[d*Q + Q - C +: C]) == (1 << C) - 1) run++;
        else run = 0;
        if (run > best) best = run;
      end
      checks++;
      if ({co, s} !== exp_sum || int'(mrl) != best || comp !== (best == 0)) begin
        failures++;
        $display("FAIL L=%0d D=%0d C=%0d: mrl=%0d expected %0d", L, D, C, mrl, best);
      end
      cyc = int'(mrl) + 1;
      sum1 += real'(cyc);
      sum2 += real'(cyc) * real'(cyc);
    end
    mean_cycles = sum1 / real'(N_SAMPLES);
    var_cycles  = sum2 / real'(N_SAMPLES) - mean_cycles * mean_cycles;
    finished = 1'b1;
  end
endmodule
