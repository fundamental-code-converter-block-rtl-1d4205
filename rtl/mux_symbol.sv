// mux_symbol: one of the fifteen symbols T1..T15 of the multiplexer-based
// binary-to-thermometer decoder, built from 2:1 multiplexers only.
//
// Parameter K (1..15) picks the symbol; output t is thermometer bit Tk (1 when
// the input value b is K or more). Each symbol is a small tree of one to three
// mux2 cells whose inputs are the constants 0 and 1, the binary inputs B1..B4
// (b[0]..b[3]) or the output of an earlier mux of the same tree; the last mux
// of the tree drives t. A mux with d0 = 0 is an AND, one with d1 = 1 an OR, so
// every tree evaluates that output's simplified equation.
//
// The netlists in NET below copy the document's symbol drawings, one row per
// mux as (d0, d1, sel), where d0 is the drawing's upper data input and d1 the
// lower one. Two points are this design's reading: sel = 1 passes the lower
// input (the only polarity under which the drawings give the thermometer
// code), and the upper input of the first mux of T9, not legible, is B2.
// Purely combinational, no clock; the delay is one to three mux levels.
module mux_symbol
  import b2t_pkg::*;
#(
  parameter int unsigned K = 1
) (
  input  bin_t b,
  output logic t
);

  // Signal sources of a mux pin: constants, binary inputs, earlier muxes.
  typedef enum logic [2:0] {
    C0 = 3'd0, C1 = 3'd1, B1 = 3'd2, B2 = 3'd3,
    B3 = 3'd4, B4 = 3'd5, M1 = 3'd6, M2 = 3'd7
  } src_e;

  typedef struct packed {
    src_e d0;
    src_e d1;
    src_e sel;
  } mux_cfg_t;

  typedef struct packed {
    logic [1:0] n_mux;   // 1..3 muxes; the last one drives t
    mux_cfg_t   m3;
    mux_cfg_t   m2;
    mux_cfg_t   m1;
  } net_t;

  localparam mux_cfg_t NONE = '{C0, C0, C0};

  function automatic net_t net_of(int unsigned k);
    unique case (k)
      1:  return '{2'd3, '{M1, C1, M2}, '{B4, C1, B3}, '{B2, C1, B1}};
      2:  return '{2'd2, NONE,          '{M1, C1, B4}, '{B3, C1, B2}};
      3:  return '{2'd3, '{M1, C1, M2}, '{B4, C1, B3}, '{C0, B2, B1}};
      4:  return '{2'd1, NONE,          NONE,          '{B4, C1, B3}};
      5:  return '{2'd3, '{M2, C1, B4}, '{C0, M1, B3}, '{B2, C1, B1}};
      6:  return '{2'd2, NONE,          '{M1, C1, B4}, '{C0, B2, B3}};
      7:  return '{2'd3, '{M2, C1, B4}, '{C0, M1, B3}, '{C0, B1, B2}};
      8:  return '{2'd1, NONE,          NONE,          '{B4, C1, C0}};
      9:  return '{2'd3, '{C0, M2, B4}, '{M1, C1, B3}, '{B2, C1, B1}};
      10: return '{2'd2, NONE,          '{C0, M1, B4}, '{B3, C1, B2}};
      11: return '{2'd3, '{C0, M2, B4}, '{M1, C1, B3}, '{C0, B2, B1}};
      12: return '{2'd1, NONE,          NONE,          '{C0, B4, B3}};
      13: return '{2'd3, '{C0, M1, M2}, '{C0, B4, B3}, '{B2, C1, B1}};
      14: return '{2'd2, NONE,          '{C0, M1, B4}, '{C0, B2, B3}};
      default:                                                   // 15
          return '{2'd3, '{C0, M1, M2}, '{C0, B4, B3}, '{C0, B2, B1}};
    endcase
  endfunction

  localparam net_t NET = net_of(K);
  localparam int unsigned NM = int'(NET.n_mux);

  if (K < 1 || K > N_THERM) begin : g_bad_k
    $error("mux_symbol: K must be 1..15");
  end

  // Mux outputs; m1 always exists, m2 and m3 only when the tree has them.
  logic m1, m2, m3;

  // Every source a pin of mux i can name, indexed by src_e. A mux can only
  // name earlier muxes, so each pool holds only the outputs before it.
  logic [7:0] pool1;
  assign pool1 = {1'b0, 1'b0, b, 1'b1, 1'b0};

  mux2 u_mux1 (
    .d0 (pool1[NET.m1.d0]),
    .d1 (pool1[NET.m1.d1]),
    .sel(pool1[NET.m1.sel]),
    .y  (m1)
  );

  if (NM >= 2) begin : g_mux2
    logic [7:0] pool2;
    assign pool2 = {1'b0, m1, b, 1'b1, 1'b0};
    mux2 u_mux2 (
      .d0 (pool2[NET.m2.d0]),
      .d1 (pool2[NET.m2.d1]),
      .sel(pool2[NET.m2.sel]),
      .y  (m2)
    );
  end else begin : g_no_mux2
    assign m2 = 1'b0;
  end

  if (NM >= 3) begin : g_mux3
    logic [7:0] pool3;
    assign pool3 = {m2, m1, b, 1'b1, 1'b0};
    mux2 u_mux3 (
      .d0 (pool3[NET.m3.d0]),
      .d1 (pool3[NET.m3.d1]),
      .sel(pool3[NET.m3.sel]),
      .y  (m3)
    );
  end else begin : g_no_mux3
    assign m3 = 1'b0;
  end

  // The last mux of the tree is the symbol's output.
  assign t = (NM == 3) ? m3 : (NM == 2) ? m2 : m1;

endmodule
