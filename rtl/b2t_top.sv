// b2t_top: the two binary-to-thermometer decoders side by side.
//
// The logic-based decoder (fifteen sum-of-products symbols) and the
// multiplexer-based decoder (fifteen trees of 2:1 multiplexers) are two
// implementations of the same 4-to-15 code conversion, compared with each
// other rather than connected, so each keeps its own input and output ports:
//   iglp_b -> iglp_t   logic-based decoder
//   mux_b  -> mux_t    multiplexer-based decoder
// Driving both inputs with the same value must give identical outputs.
// Both paths are purely combinational; there is no clock or reset.
// Presenting the two as separate port groups of one top is this design's
// choice; the document draws and simulates each on its own.
module b2t_top
  import b2t_pkg::*;
(
  input  bin_t   iglp_b,
  output therm_t iglp_t,
  input  bin_t   mux_b,
  output therm_t mux_t
);

  iglp_decoder u_iglp (
    .b(iglp_b),
    .t(iglp_t)
  );

  mux_decoder u_mux (
    .b(mux_b),
    .t(mux_t)
  );

endmodule
