// iglp_symbol: one of the fifteen logic symbols T1..T15 of the logic-based
// (IG-LP FinFET) binary-to-thermometer decoder.
//
// Parameter K (1..15) picks the symbol; its output t is thermometer bit Tk,
// which is 1 when the 4-bit input value b is K or more. Each symbol evaluates
// its own K-map-simplified sum-of-products over B4..B1 (b[3]..b[0]), the
// equations below, rather than comparing b with K; the document realises each
// one as a single complementary FinFET network in independent-gate low-power
// bias, which at the logic level is the same Boolean function.
// Purely combinational, no clock.
//
// The equations follow the document. Three are this design's reading where
// the printed set is incomplete: T6 = B3B2 + B4 (no equation is printed for
// it), T8 = B4 and T12 = B4B3 (the printed ones repeat their neighbours'); all
// three follow from the thermometer truth table and the symbol drawings.
module iglp_symbol
  import b2t_pkg::*;
#(
  parameter int unsigned K = 1
) (
  input  bin_t b,
  output logic t
);

  logic b1, b2, b3, b4;
  assign {b4, b3, b2, b1} = b;

  if (K < 1 || K > N_THERM) begin : g_bad_k
    $error("iglp_symbol: K must be 1..15");
  end

  always_comb begin
    unique case (K)
      1:       t = b1 | b2 | b3 | b4;
      2:       t = b2 | b3 | b4;
      3:       t = (b1 & b2) | b3 | b4;
      4:       t = b3 | b4;
      5:       t = (b3 & (b1 | b2)) | b4;
      6:       t = (b3 & b2) | b4;
      7:       t = (b1 & b2 & b3) | b4;
      8:       t = b4;
      9:       t = b4 & (b1 | b2 | b3);
      10:      t = b4 & (b2 | b3);
      11:      t = b4 & ((b1 & b2) | b3);
      12:      t = b4 & b3;
      13:      t = b4 & b3 & (b1 | b2);
      14:      t = b4 & b3 & b2;
      default: t = b4 & b3 & b2 & b1;   // K = 15
    endcase
  end

endmodule
