// ccid: carry chain interrupt detection over a group of C bit pairs.
//
// The group is the top C bits of a partial adder. If the partial sum of the
// two C-bit operand slices equals 2^C-1, every pair propagates and the carry
// leaving the group is the carry entering it (r = 0). Otherwise the group
// kills (sum < 2^C-1) or generates (sum > 2^C-1) the carry by itself, so the
// carry leaving the PA is already fixed (r = 1) and the next PA can start
// without waiting for the chain below. A random group is decisive with
// probability 1 - 2^-C.
//
// The sum equals 2^C-1 exactly when b is the bitwise complement of a, so the
// test is built as a C-input AND of the pairwise XORs (depth 1 + log2 C), the
// usual cheap form of "add and compare with all ones". The group carry for the
// decisive case is the carry of a C-bit addition with carry-in 0; it is given
// out for observation, the adder itself still takes its carries from the
// ripple chain.
//
// Interface: a, b (C bits) in; r and carry out. Purely combinational.
module ccid #(
  parameter int unsigned C = ccid_pkg::C_DEFAULT
) (
  input  logic [C-1:0] a,
  input  logic [C-1:0] b,
  output logic         r,
  output logic         carry
);

  logic [C:0] group_sum;

  always_comb begin
    r         = ~&(a ^ b);
    group_sum = {1'b0, a} + {1'b0, b};
    carry     = group_sum[C];
  end

endmodule
