// tb_ccid_adder: end-to-end test of the synchronous variable-latency CCID adder
// at its default size (128 bits, 8 partial adders, 4-bit CCIDs).
//
// A driver offers additions on the negative clock edge: random operands, b = ~a
// with a chosen number of leading propagating boundaries (to force every
// latency from 1 to D cycles), operands that are decided by generate or by kill
// at the CCIDs, back-to-back requests, requests while the adder is busy (which
// must be ignored) and idle gaps. A monitor on the positive edge records every
// accepted request and, at each done pulse, checks sum, carry-out, the reported
// latency and the number of clock cycles actually taken against a reference
// that computes M_RL from the C-bit partial sums of the operands. An
// asynchronous reset in the middle of an addition is checked to abort it.
// Each mechanism is counted and a mechanism that never occurs is a failure.
module tb_ccid_adder;
  import ccid_pkg::*;

  localparam int unsigned L = L_DEFAULT, D = D_DEFAULT, C = C_DEFAULT, Q = L / D;
  localparam int unsigned LW = $clog2(D + 1);
  localparam int unsigned N_OPS = 3000;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0;
  logic [L-1:0]  a = '0, b = '0;
  logic          cin = 1'b0;
  logic          ready, done, cout;
  logic [L-1:0]  sum;
  logic [LW-1:0] latency;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // Mechanism counters.
  int lat_seen [D+1];
  int n_back_to_back = 0, n_ignored = 0, n_generate = 0, n_kill = 0,
      n_propagate = 0, n_reset_abort = 0, n_done = 0;

  typedef struct {
    logic [L-1:0] a, b;
    logic         cin;
    longint       accept_cycle;
  } req_t;
  req_t pending [$];
  longint last_done_cycle = -10;

  ccid_adder dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .cin(cin),
    .ready(ready), .done(done), .sum(sum), .cout(cout), .latency(latency));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N_OPS * (D + 4) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference cycle count: one more than the longest run of PA boundaries
  // whose top C bits add up to exactly 2^C - 1.
  function automatic int ref_cycles(logic [L-1:0] x, logic [L-1:0] y);
    int run = 0, best = 0;
    for (int d = 0; d < D - 1; d++) begin
      int gs;
      gs = int'(x[d*Q + Q - C +: C]) + int'(y[d*Q + Q - C +: C]);
      if (gs == (1 << C) - 1) run++;
      else run = 0;
      if (run > best) best = run;
    end
    return best + 1;
  endfunction

  // Monitor: sample on the rising edge, before the design's registers update.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (done) begin
        req_t rq;
        logic [L:0] exp_sum;
        int exp_cycles;
        longint taken;
        n_done++;
        if (pending.size() == 0) begin
          failures++;
          $display("FAIL done without a pending request at cycle %0d", cycle);
        end else begin
          rq = pending.pop_front();
          exp_sum = {1'b0, rq.a} + {1'b0, rq.b} + (L+1)'(rq.cin);
          exp_cycles = ref_cycles(rq.a, rq.b);
          taken = cycle - 1 - rq.accept_cycle;
          checks++;
          if ({cout, sum} !== exp_sum) begin
            failures++;
            $display("FAIL sum %h expected %h", {cout, sum}, exp_sum);
          end
          checks++;
          if (int'(latency) != exp_cycles || taken != longint'(exp_cycles)) begin
            failures++;
            $display("FAIL latency reported %0d, taken %0d, expected %0d", latency, taken, exp_cycles);
          end
          lat_seen[exp_cycles]++;
          last_done_cycle = cycle;
        end
      end
      if (start) begin
        if (ready) begin
          req_t rq;
          rq.a = a; rq.b = b; rq.cin = cin; rq.accept_cycle = cycle;
          // Accepted in the same cycle as the previous result finished.
          if (pending.size() != 0) n_back_to_back++;
          pending.push_back(rq);
          for (int d = 0; d < D - 1; d++) begin
            int gs;
            gs = int'(a[d*Q + Q - C +: C]) + int'(b[d*Q + Q - C +: C]);
            if (gs > (1 << C) - 1) n_generate++;
            else if (gs < (1 << C) - 1) n_kill++;
            else n_propagate++;
          end
        end else begin
          n_ignored++;
        end
      end
    end
  end

  function automatic logic [L-1:0] rand_word();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Operands whose lowest k PA boundaries propagate and the rest are decided.
  task automatic make_run(input int k, output logic [L-1:0] x, output logic [L-1:0] y);
    x = rand_word();
    y = ~x;
    for (int d = k; d < D - 1; d++) y[d*Q + Q - 1 - ($urandom % C)] ^= 1'b1;
    // Random low bits inside each PA keep the sum itself non-trivial.
    for (int d = 0; d < D; d++) y[d*Q +: 2] = 2'($urandom);
  endtask

  initial begin
    logic [L-1:0] x, y;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < N_OPS; i++) begin
      @(negedge clk);
      case (i % 6)
        0, 1: begin
          x = rand_word(); y = rand_word();
        end
        2: make_run($urandom % D, x, y);
        3: begin
          // All CCIDs decided by generate (both top bits set) or by kill.
          x = rand_word(); y = rand_word();
          for (int d = 0; d < D - 1; d++) begin
            logic g;
            g = 1'($urandom);
            x[d*Q + Q - 1] = g; y[d*Q + Q - 1] = g;
          end
        end
        4: make_run(D - 1, x, y);            // worst case: D cycles
        default: begin
          x = rand_word(); y = x ^ rand_word();
        end
      endcase
      a = x; b = y; cin = 1'($urandom);
      // Mostly keep start high; now and then leave a gap.
      start = ($urandom % 8) != 0;
    end
    @(negedge clk) start = 1'b0;
    wait (pending.size() == 0);
    repeat (3) @(posedge clk);

    // Reset during a long addition aborts it: no done, ready afterwards.
    @(negedge clk);
    make_run(D - 1, x, y);
    a = x; b = y; start = 1'b1;
    @(negedge clk) start = 1'b0;
    @(negedge clk) rst_n = 1'b0;
    pending.delete();
    @(negedge clk);
    checks++;
    if (done !== 1'b0 || ready !== 1'b1 || sum !== '0) begin
      failures++;
      $display("FAIL reset did not clear the adder");
    end else begin
      n_reset_abort++;
    end
    @(negedge clk) rst_n = 1'b1;
    repeat (D + 2) @(posedge clk);
    checks++;
    if (n_done == 0) failures++;

    // One more addition after the reset.
    @(negedge clk);
    make_run(2, x, y);
    a = x; b = y; start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (pending.size() == 0);
    repeat (2) @(posedge clk);

    for (int k = 1; k <= D; k++) begin
      $display("latency %0d cycles: %0d additions", k, lat_seen[k]);
      checks++;
      if (lat_seen[k] == 0) begin
        failures++;
        $display("FAIL latency %0d never occurred", k);
      end
    end
    $display("back-to-back %0d, ignored while busy %0d, CCID generate %0d kill %0d propagate %0d, reset abort %0d",
             n_back_to_back, n_ignored, n_generate, n_kill, n_propagate, n_reset_abort);
    checks++;
    if (n_back_to_back == 0 || n_ignored == 0 || n_generate == 0 || n_kill == 0 ||
        n_propagate == 0 || n_reset_abort == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
