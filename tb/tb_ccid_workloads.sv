// tb_ccid_workloads: the configurations over which the CCID adder is evaluated.
//
//  * 128-bit adder split into D = 2, 4, 8, 16, 32 partial adders, each with
//    CCID widths C = 2 .. min(8, L/D) (the cycle-count / cycle-time sweep);
//  * the synthesized sizes 128/4, 128/8, 256/4 and 256/8 with C = 4.
//
// For each point the mean number of clock cycles over random operands is
// measured on the RTL and compared with the exact expectation 1 + E[M_RL],
// where M_RL is the longest run of propagating boundaries among D-1
// independent boundaries, each propagating with probability 2^-C; the
// distribution of the longest run is computed with a small dynamic program.
// The unit-gate delay model then gives the average delay relative to a plain
// L-bit ripple-carry adder, (C + L/D) / L * cycles, and the best speedup per D
// is checked against the stated gains: almost 2x for D=2, above 3x for D=4 and
// above 5x for D=8. Every sum and M_RL is checked too.
module tb_ccid_workloads;
  localparam int N_SWEEP = 5;
  localparam int unsigned DS [N_SWEEP] = '{2, 4, 8, 16, 32};
  localparam int unsigned CMAX = 8;
  localparam int unsigned N_SAMPLES = 4000;

  int checks = 0, failures = 0;
  real best_speedup [N_SWEEP];

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Exact E[longest run of successes] in n Bernoulli(p) trials.
  function automatic real expected_longest_run(int n, real p);
    real e;
    e = 0.0;
    for (int k = 1; k <= n; k++) begin
      // P(longest run < k): state = current run length 0..k-1.
      real st [64];
      real nx [64];
      real tot;
      for (int j = 0; j < k; j++) st[j] = 0.0;
      st[0] = 1.0;
      for (int t = 0; t < n; t++) begin
        for (int j = 0; j < k; j++) nx[j] = 0.0;
        for (int j = 0; j < k; j++) begin
          nx[0] += st[j] * (1.0 - p);
          if (j + 1 < k) nx[j+1] += st[j] * p;
        end
        for (int j = 0; j < k; j++) st[j] = nx[j];
      end
      tot = 0.0;
      for (int j = 0; j < k; j++) tot += st[j];
      e += 1.0 - tot;
    end
    return e;
  endfunction

  task automatic evaluate(input int l, input int d, input int c, input real mean,
                          input real vr, input int pchecks, input int pfail,
                          output real speedup);
    real expect_cycles, tol, rel_delay;
    checks += pchecks;
    failures += pfail;
    expect_cycles = 1.0 + expected_longest_run(d - 1, 1.0 / real'(1 << c));
    tol = 5.0 * $sqrt((vr > 0.0 ? vr : 0.0) / real'(N_SAMPLES)) + 0.01;
    rel_delay = (real'(c) + real'(l) / real'(d)) / real'(l) * mean;
    speedup = 1.0 / rel_delay;
    checks++;
    if (mean > expect_cycles + tol || mean < expect_cycles - tol) begin
      failures++;
      $display("FAIL L=%0d D=%0d C=%0d mean cycles %f, expected %f", l, d, c, mean, expect_cycles);
    end
    $display("L=%0d D=%0d C=%0d  cycles %.4f (exact %.4f)  cycle time %.4f  delay %.4f  speedup %.2f",
             l, d, c, mean, expect_cycles, (real'(c) + real'(l) / real'(d)) / real'(l),
             rel_delay, speedup);
  endtask

  int n_points = 0, n_done = 0;

  for (genvar i = 0; i < N_SWEEP; i++) begin : g_d
    for (genvar c = 2; c <= CMAX; c++) begin : g_c
      if (c <= 128 / DS[i]) begin : g_on
        logic fin;
        real  mean, vr;
        int   pc, pf;
        ccid_workload_point #(.L(128), .D(DS[i]), .C(c), .N_SAMPLES(N_SAMPLES)) u_pt (
          .finished(fin), .mean_cycles(mean), .var_cycles(vr), .checks(pc), .failures(pf));
        initial begin
          real sp;
          n_points++;
          #1;
          wait (fin === 1'b1);
          evaluate(128, DS[i], c, mean, vr, pc, pf, sp);
          if (sp > best_speedup[i]) best_speedup[i] = sp;
          n_done++;
        end
      end
    end
  end

  // Table 1 sizes with 256-bit operands (the 128-bit ones are in the sweep).
  for (genvar j = 0; j < 2; j++) begin : g_256
    localparam int unsigned DD = (j == 0) ? 4 : 8;
    logic fin;
    real  mean, vr;
    int   pc, pf;
    ccid_workload_point #(.L(256), .D(DD), .C(4), .N_SAMPLES(N_SAMPLES)) u_pt (
      .finished(fin), .mean_cycles(mean), .var_cycles(vr), .checks(pc), .failures(pf));
    initial begin
      real sp;
      n_points++;
      #1;
      wait (fin === 1'b1);
      evaluate(256, DD, 4, mean, vr, pc, pf, sp);
      n_done++;
    end
  end

  initial begin
    for (int i = 0; i < N_SWEEP; i++) best_speedup[i] = 0.0;
    #1;
    wait (n_done == n_points);
    for (int i = 0; i < N_SWEEP; i++)
      $display("D=%0d: best average speedup over a 128-bit ripple-carry adder %.2f", DS[i], best_speedup[i]);
    checks++;
    if (best_speedup[0] < 1.8 || best_speedup[0] >= 2.0) begin
      failures++;
      $display("FAIL D=2 speedup is not 'almost 2'");
    end
    checks++;
    if (best_speedup[1] <= 3.0) begin
      failures++;
      $display("FAIL D=4 speedup not above 3");
    end
    checks++;
    if (best_speedup[2] <= 5.0) begin
      failures++;
      $display("FAIL D=8 speedup not above 5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
