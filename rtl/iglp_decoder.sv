// iglp_decoder: logic-based 4-bit binary to 15-bit thermometer decoder.
//
// Fifteen independent symbols T1..T15 (iglp_symbol) all read the same binary
// input B4..B1; symbol k drives t[k-1]. No symbol depends on another, so the
// delay is that of a single symbol. Output: t[k-1] = 1 exactly when b >= k, so
// b = 0 gives all zeros, b = 15 all ones, and the ones always fill from t[0]
// upward. This structure is the document's; purely combinational, no clock.
// T8 (t[7]) is input B4 itself, so that output is a wire from b[3].
// A deferred immediate assertion checks that the output is always a valid
// thermometer code.
module iglp_decoder
  import b2t_pkg::*;
(
  input  bin_t   b,
  output therm_t t
);

  for (genvar k = 1; k <= N_THERM; k++) begin : g_sym
    iglp_symbol #(.K(k)) u_sym (
      .b(b),
      .t(t[k-1])
    );
  end

  // Deferred so that it judges the settled output, not a transient one.
  always_comb begin
    assert final (is_thermometer(t))
      else $error("iglp_decoder: output %b is not a thermometer code", t);
  end

endmodule
