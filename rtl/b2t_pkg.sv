// b2t_pkg: sizes and code types shared by the binary-to-thermometer decoders.
//
// The decoder turns a 4-bit binary number B4..B1 into a 15-bit thermometer
// code T15..T1, where Tk is 1 exactly when the binary value is k or more.
// Bit order used throughout: bin_t[0] is B1 (the least significant bit) and
// therm_t[k-1] is Tk. The 4-bit width and the 15 outputs are the document's;
// the type names and bit order are this design's choice, fixed by the
// equations T1 = B1+B2+B3+B4 and T15 = B4B3B2B1.
package b2t_pkg;

  localparam int unsigned N_BITS  = 4;
  localparam int unsigned N_THERM = (1 << N_BITS) - 1;

  typedef logic [N_BITS-1:0]  bin_t;
  typedef logic [N_THERM-1:0] therm_t;

  // True when the code has no 1 above a 0, i.e. it is a valid thermometer
  // code (a 0 followed higher up by a 1, such as 01101, is invalid).
  function automatic logic is_thermometer(therm_t t);
    // t + 1 is a power of two exactly when t is all ones from bit 0 upward
    therm_t tp1;
    tp1 = t + therm_t'(1);
    return (t & tp1) == '0;
  endfunction

endpackage
