// max_runlength_detector: longest run of carry propagation across PA boundaries.
//
// r[d] = 1 means the carry leaving partial adder d is fixed by its CCID; r[d] = 0
// means it depends on the carry entering PA d. A run of k zeros therefore makes
// k+1 partial adders ripple one after the other, and the adder needs M_RL + 1
// clock cycles, where M_RL is the longest run of zeros in r[D-2:0] (0 .. D-1).
//
// M_RL is read from a lookup table indexed by r, with 2^(D-1) entries computed
// at elaboration from the run-length definition. For D-1 above LUT_MAX_BITS the
// table would be impractical, and the same function is built as logic instead;
// the table form follows the described realization, the fallback is this
// design's own choice.
//
// The completion signal compares the cycle count of the running addition with
// M_RL: `elapsed` is the number of clock cycles already completed since the
// operands were loaded (0 during the first cycle), and `completion` is high in
// the cycle at whose end the sum is final, i.e. once elapsed >= M_RL.
//
// Interface: r (D-1 bits), elapsed in; mrl, completion out. Combinational.
module max_runlength_detector #(
  parameter int unsigned D            = ccid_pkg::D_DEFAULT,
  parameter int unsigned LUT_MAX_BITS = 12,
  localparam int unsigned MW          = (D > 2) ? $clog2(D) : 1
) (
  input  logic [D-2:0]  r,
  input  logic [MW-1:0] elapsed,
  output logic [MW-1:0] mrl,
  output logic          completion
);

  // Longest run of zeros in a (D-1)-bit CCID vector.
  function automatic logic [MW-1:0] longest_zero_run(logic [D-2:0] v);
    logic [MW-1:0] run;
    logic [MW-1:0] best;
    run  = '0;
    best = '0;
    for (int unsigned i = 0; i < D - 1; i++) begin
      if (v[i]) begin
        run = '0;
      end else begin
        run = run + 1'b1;
      end
      if (run > best) best = run;
    end
    return best;
  endfunction

  if (D - 1 <= LUT_MAX_BITS) begin : g_lut
    localparam int unsigned ENTRIES = 2 ** (D - 1);
    logic [MW-1:0] lut [ENTRIES];

    for (genvar i = 0; i < ENTRIES; i++) begin : g_entry
      assign lut[i] = longest_zero_run((D-1)'(i));
    end

    assign mrl = lut[r];
  end else begin : g_logic
    always_comb mrl = longest_zero_run(r);
  end

  assign completion = (elapsed >= mrl);

endmodule
