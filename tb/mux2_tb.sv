// mux2_tb: exhaustive self-check of the 2:1 multiplexer cell.
//
// Applies all eight (d0, d1, sel) combinations twice, once per clock, and
// compares y with the value picked by a truth-table lookup written here,
// independent of the cell. Also checks the two gate uses the decoder relies on:
// d0 = 0 acts as AND, d1 = 1 acts as OR. A watchdog ends the run with a
// failure if it has not finished after 200 cycles.
module mux2_tb;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic d0, d1, sel, y;

  mux2 dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  // Expected output indexed by {sel, d1, d0}.
  localparam logic [7:0] TRUTH = 8'b1100_1010;

  task automatic check(input logic exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: d0=%b d1=%b sel=%b y=%b expected %b", what, d0, d1, sel, y, exp);
    end
  endtask

  initial begin
    d0 = 0; d1 = 0; sel = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int v = 0; v < 8; v++) begin
        @(negedge clk);
        {sel, d1, d0} = 3'(v);
        @(posedge clk);
        check(TRUTH[v], "truth table");
        if (d0 == 1'b0) check(sel & d1, "AND use");
        if (d1 == 1'b1) check(sel | d0, "OR use");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
