// partial_adder: a Q-bit ripple-carry partial adder (PA).
//
// Q full adders are chained LSB to MSB; the carry-out of stage i feeds the
// carry-in of stage i+1. This smallest and most regular adder form is the one
// used for each slice of the CCID adder. Its delay grows linearly with Q (about
// 2Q gate delays), which is what makes the slice count D matter.
//
// Interface: a, b (Q bits), ci in; s (Q bits), co out. Purely combinational.
module partial_adder #(
  parameter int unsigned Q = ccid_pkg::L_DEFAULT / ccid_pkg::D_DEFAULT
) (
  input  logic [Q-1:0] a,
  input  logic [Q-1:0] b,
  input  logic         ci,
  output logic [Q-1:0] s,
  output logic         co
);

  logic [Q:0] c;

  assign c[0] = ci;
  assign co   = c[Q];

  for (genvar i = 0; i < Q; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

endmodule
