// full_adder: one ripple-carry stage (FA_n).
//
// The carry follows the majority function c_n = a_n b_n + a_n c_{n-1} +
// b_n c_{n-1}; the sum bit is the XOR of the three inputs. The carry-out only
// depends on the carry-in when exactly one of a_n, b_n is set: both zero kill
// the carry, both one generate it. The CCID blocks exploit that property.
//
// Interface: a, b, ci in; s, co out. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
