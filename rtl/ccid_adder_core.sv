// ccid_adder_core: L-bit ripple-carry adder with carry chain interrupt detection.
//
// The adder is cut into D partial adders (PAs) of Q = L/D bits whose carries
// ripple from one to the next exactly as in a plain ripple-carry adder, so the
// sum is always the ordinary L-bit sum. Alongside, a CCID watches the top C
// bits of every PA except the last and reports r[d] = 1 when the carry leaving
// PA d cannot depend on the carry entering it. The maximum run-length detector
// turns r into M_RL, the longest chain of PAs that must wait on each other,
// and so into the number of clock cycles (M_RL + 1, from 1 to D) that the sum
// needs to settle when the clock period covers one C-bit group plus one PA.
//
// Interface: a, b (L bits), cin in; sum (L bits), cout, r (CCID vector),
// mrl, and the completion signal for the cycle count `elapsed`.
// Purely combinational; the caller times its sampling with `completion`.
module ccid_adder_core #(
  parameter int unsigned L            = ccid_pkg::L_DEFAULT,
  parameter int unsigned D            = ccid_pkg::D_DEFAULT,
  parameter int unsigned C            = ccid_pkg::C_DEFAULT,
  parameter int unsigned LUT_MAX_BITS = 12,
  localparam int unsigned Q           = L / D,
  localparam int unsigned MW          = (D > 2) ? $clog2(D) : 1
) (
  input  logic [L-1:0]  a,
  input  logic [L-1:0]  b,
  input  logic          cin,
  input  logic [MW-1:0] elapsed,
  output logic [L-1:0]  sum,
  output logic          cout,
  output logic [D-2:0]  r,
  output logic [D-2:0]  group_carry,
  output logic [MW-1:0] mrl,
  output logic          completion
);

  // The partitioning must be exact and each CCID group must lie inside its PA.
  if (D < 2 || L % D != 0 || C < 1 || C > Q) begin : g_bad_config
    $error("ccid_adder_core: need D >= 2, L divisible by D and 1 <= C <= L/D");
  end

  logic [D:0] carry;

  assign carry[0] = cin;
  assign cout     = carry[D];

  for (genvar d = 0; d < D; d++) begin : g_pa
    partial_adder #(.Q(Q)) u_pa (
      .a (a[d*Q +: Q]),
      .b (b[d*Q +: Q]),
      .ci(carry[d]),
      .s (sum[d*Q +: Q]),
      .co(carry[d+1])
    );
  end

  // CCID d sits on the last C bits of PA d, for all but the last PA.
  for (genvar d = 0; d < D - 1; d++) begin : g_ccid
    ccid #(.C(C)) u_ccid (
      .a    (a[d*Q + Q - C +: C]),
      .b    (b[d*Q + Q - C +: C]),
      .r    (r[d]),
      .carry(group_carry[d])
    );
  end

  max_runlength_detector #(
    .D           (D),
    .LUT_MAX_BITS(LUT_MAX_BITS)
  ) u_mrl (
    .r         (r),
    .elapsed   (elapsed),
    .mrl       (mrl),
    .completion(completion)
  );

endmodule
