// ccid_adder: synchronous variable-latency adder with carry chain interrupt
// detection (top level).
//
// The operands are loaded into registers and applied to an L-bit ripple-carry
// adder (ccid_adder_core) that is far too slow to settle within one clock
// period in the worst case. The clock period is instead sized for one C-bit
// CCID group plus one partial adder of L/D bits. The CCIDs and the maximum
// run-length detector work out from the operands how many partial adders must
// wait on each other (M_RL), and the result register samples the sum only after
// M_RL + 1 cycles: 1 cycle for most operands, D cycles in the worst case.
// The path from the operand registers through the adder to the result register
// is therefore a multicycle path whose length is chosen per operation.
//
// Interface and timing (all on the rising edge of clk, active-low async reset):
//   start/a/b/cin  an addition is accepted in a cycle where start && ready;
//                  the operands are registered at that edge.
//   ready          high when idle, and also in the last cycle of a running
//                  addition, so that additions can follow back to back.
//                  start while ready is low is ignored.
//   done           one-cycle pulse; sum, cout and latency are valid from then
//                  on and held until the next result.
//   latency        number of cycles the result took, M_RL + 1 (1 .. D).
// An addition accepted at edge k ends with the result registered at edge
// k + M_RL + 1, so done is high in the cycle after that edge.
//
// The cycle-counting controller and this handshake are this design's own
// choice: the source technique fixes only the cycle count (between 1 and D) and
// the completion signal from the run-length detector.
module ccid_adder #(
  parameter int unsigned L            = ccid_pkg::L_DEFAULT,
  parameter int unsigned D            = ccid_pkg::D_DEFAULT,
  parameter int unsigned C            = ccid_pkg::C_DEFAULT,
  parameter int unsigned LUT_MAX_BITS = 12,
  localparam int unsigned MW          = (D > 2) ? $clog2(D) : 1,
  localparam int unsigned LW          = $clog2(D + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [L-1:0]  a,
  input  logic [L-1:0]  b,
  input  logic          cin,
  output logic          ready,
  output logic          done,
  output logic [L-1:0]  sum,
  output logic          cout,
  output logic [LW-1:0] latency
);

  logic [L-1:0]  op_a, op_b;
  logic          op_cin;
  logic          busy;
  logic [MW-1:0] elapsed;

  logic [L-1:0]  core_sum;
  logic          core_cout;
  logic [D-2:0]  core_r;
  logic [D-2:0]  core_group_carry;
  logic [MW-1:0] core_mrl;
  logic          core_completion;

  logic          finishing;
  logic          accept;

  ccid_adder_core #(
    .L           (L),
    .D           (D),
    .C           (C),
    .LUT_MAX_BITS(LUT_MAX_BITS)
  ) u_core (
    .a          (op_a),
    .b          (op_b),
    .cin        (op_cin),
    .elapsed    (elapsed),
    .sum        (core_sum),
    .cout       (core_cout),
    .r          (core_r),
    .group_carry(core_group_carry),
    .mrl        (core_mrl),
    .completion (core_completion)
  );

  assign finishing = busy & core_completion;
  assign ready     = ~busy | finishing;
  assign accept    = start & ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_a    <= '0;
      op_b    <= '0;
      op_cin  <= 1'b0;
      busy    <= 1'b0;
      elapsed <= '0;
      done    <= 1'b0;
      sum     <= '0;
      cout    <= 1'b0;
      latency <= '0;
    end else begin
      done <= finishing;
      if (finishing) begin
        sum     <= core_sum;
        cout    <= core_cout;
        latency <= LW'(elapsed) + 1'b1;
      end
      if (accept) begin
        op_a    <= a;
        op_b    <= b;
        op_cin  <= cin;
        busy    <= 1'b1;
        elapsed <= '0;
      end else if (finishing) begin
        busy    <= 1'b0;
      end else if (busy) begin
        elapsed <= elapsed + 1'b1;
      end
    end
  end

  // The addition never runs longer than M_RL + 1 cycles, and M_RL < D.
  a_no_overrun : assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (elapsed <= core_mrl));
  a_bounded_latency : assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (core_mrl <= MW'(D - 1)));

endmodule
