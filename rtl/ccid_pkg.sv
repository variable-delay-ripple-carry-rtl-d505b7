// ccid_pkg: configuration shared by the carry-chain-interrupt-detection (CCID)
// adder. The defaults describe the main configuration: a 128-bit ripple-carry
// adder cut into 8 partial adders (PAs) of 16 bits, each boundary watched by a
// 4-bit CCID. Only constants live here; every module takes them as parameter
// defaults so that other sizes (128/4, 256/4, 256/8, ...) are a parameter change.
package ccid_pkg;

  // Operand width L in bits.
  parameter int unsigned L_DEFAULT = 128;
  // Number of partial adders D; the adder needs between 1 and D clock cycles.
  parameter int unsigned D_DEFAULT = 8;
  // Number of bits C examined by each CCID at the top of a partial adder.
  parameter int unsigned C_DEFAULT = 4;

endpackage
