// b2t_top_tb: end-to-end test of both binary-to-thermometer decoders.
//
// Phase 1 drives the same value into both decoders and steps it through
// 0..15 in binary counting order, the way four pulse sources of periods
// 2, 4, 8 and 16 steps would (B1 toggling fastest), twice over. Phase 2 drives
// the two decoders with independent random values. At every clock each output
// word is compared with a reference thermometer word built here (the low b
// bits set), checked to be a valid thermometer code, and in phase 1 the two
// decoders are compared with each other. Outputs are sampled one clock after
// the inputs change (combinational: zero-cycle latency).
//
// Coverage counted and required at least once per decoder: every input code,
// every output bit rising and falling, the all-zeros and all-ones outputs.
// The top runs with its default parameters. Watchdog: 2000 cycles.
module b2t_top_tb;
  import b2t_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  bin_t   iglp_b, mux_b;
  therm_t iglp_t, mux_t;

  b2t_top dut (
    .iglp_b(iglp_b), .iglp_t(iglp_t),
    .mux_b (mux_b),  .mux_t (mux_t)
  );

  // Coverage, index 0 = logic-based decoder, 1 = multiplexer-based decoder.
  int     code_hits [2][16];
  int     rises     [2][N_THERM];
  int     falls     [2][N_THERM];
  int     all_zero  [2];
  int     all_one   [2];
  int     agree_hits;
  therm_t prev      [2];
  logic   have_prev;

  function automatic therm_t ref_therm(int unsigned v);
    therm_t r = '0;
    for (int unsigned i = 0; i < v; i++) r[i] = 1'b1;
    return r;
  endfunction

  task automatic check_one(input int d, input int unsigned v, input therm_t got);
    therm_t exp = ref_therm(v);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL decoder %0d: b=%0d t=%b expected %b", d, v, got, exp);
    end
    checks++;
    if (!is_thermometer(got)) begin
      failures++;
      $display("FAIL decoder %0d: t=%b is not a thermometer code", d, got);
    end
    code_hits[d][v]++;
    if (got == '0) all_zero[d]++;
    if (got == '1) all_one[d]++;
    if (have_prev) begin
      for (int i = 0; i < int'(N_THERM); i++) begin
        if (!prev[d][i] &&  got[i]) rises[d][i]++;
        if ( prev[d][i] && !got[i]) falls[d][i]++;
      end
    end
    prev[d] = got;
  endtask

  task automatic step(input int unsigned vi, input int unsigned vm, input logic same);
    @(negedge clk);
    iglp_b = bin_t'(vi);
    mux_b  = bin_t'(vm);
    @(posedge clk);
    check_one(0, vi, iglp_t);
    check_one(1, vm, mux_t);
    have_prev = 1'b1;
    if (same) begin
      checks++;
      agree_hits++;
      if (iglp_t !== mux_t) begin
        failures++;
        $display("FAIL decoders disagree at b=%0d: %b vs %b", vi, iglp_t, mux_t);
      end
    end
  endtask

  task automatic require(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end
  endtask

  initial begin
    iglp_b = '0;
    mux_b = '0;
    have_prev = 1'b0;
    agree_hits = 0;
    foreach (all_zero[d]) begin
      all_zero[d] = 0;
      all_one[d] = 0;
      prev[d] = '0;
      foreach (code_hits[d][v]) code_hits[d][v] = 0;
      for (int i = 0; i < int'(N_THERM); i++) begin
        rises[d][i] = 0;
        falls[d][i] = 0;
      end
    end

    // Phase 1: counting sweep, both decoders fed alike.
    for (int rep = 0; rep < 2; rep++)
      for (int unsigned v = 0; v < 16; v++) step(v, v, 1'b1);

    // Phase 2: independent random inputs.
    repeat (300) step($urandom_range(15, 0), $urandom_range(15, 0), 1'b0);

    // Coverage of what each decoder is meant to do.
    for (int d = 0; d < 2; d++) begin
      for (int v = 0; v < 16; v++) require(code_hits[d][v], $sformatf("decoder %0d input %0d", d, v));
      for (int i = 0; i < int'(N_THERM); i++) begin
        require(rises[d][i], $sformatf("decoder %0d T%0d rising", d, i + 1));
        require(falls[d][i], $sformatf("decoder %0d T%0d falling", d, i + 1));
      end
      require(all_zero[d], $sformatf("decoder %0d all-zeros output", d));
      require(all_one[d], $sformatf("decoder %0d all-ones output", d));
      $display("decoder %0d: all-zeros %0d, all-ones %0d, T1 rises %0d, T15 rises %0d",
               d, all_zero[d], all_one[d], rises[d][0], rises[d][N_THERM-1]);
    end
    require(agree_hits, "decoders compared on the same input");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
