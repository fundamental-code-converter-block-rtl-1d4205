// iglp_decoder_tb: self-check of the logic-based 4-to-15 thermometer decoder.
//
// Sweeps the input through all 16 values in counting order, then applies 200
// random values, one per clock. Each output word is compared with a reference
// built here by setting the low b bits of a 15-bit word, and checked to be a
// valid thermometer code (no 1 above a 0). The output is sampled one clock
// after the input changes: the decoder is combinational, so the result must be
// there within that cycle. Watchdog: 1000 cycles.
module iglp_decoder_tb;
  import b2t_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  bin_t   b;
  therm_t t;

  iglp_decoder dut (.b(b), .t(t));

  function automatic therm_t ref_therm(int unsigned v);
    therm_t r = '0;
    for (int unsigned i = 0; i < v; i++) r[i] = 1'b1;
    return r;
  endfunction

  task automatic apply(input int unsigned v);
    therm_t exp;
    @(negedge clk);
    b = bin_t'(v);
    @(posedge clk);
    exp = ref_therm(v);
    checks++;
    if (t !== exp) begin
      failures++;
      $display("FAIL b=%0d t=%b expected %b", v, t, exp);
    end
    checks++;
    if (!is_thermometer(t)) begin
      failures++;
      $display("FAIL b=%0d t=%b is not a thermometer code", v, t);
    end
  endtask

  initial begin
    b = '0;
    for (int unsigned v = 0; v < 16; v++) apply(v);
    repeat (200) apply($urandom_range(15, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
