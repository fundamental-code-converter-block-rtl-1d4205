// mux2: 2:1 multiplexer, the single building cell of the multiplexer-based
// binary-to-thermometer decoder.
//
// y follows d1 while sel is 1 and d0 while sel is 0. Tying one data input to a
// constant turns the cell into a two-input gate: d0 = 0 gives y = sel & d1
// (AND) and d1 = 1 gives y = sel | d0 (OR), which is how the decoder's symbols
// build their sum-of-products equations from multiplexers alone.
// Purely combinational, no clock. The document builds this cell from FinFETs
// and does not print which data input sel = 1 picks; the choice here
// (d1 = the lower input of the symbol drawings) is the one under which every
// drawn symbol computes its equation.
module mux2 (
  input  logic d0,   // passed when sel = 0
  input  logic d1,   // passed when sel = 1
  input  logic sel,
  output logic y
);

  always_comb y = sel ? d1 : d0;

endmodule
