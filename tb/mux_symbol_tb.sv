// mux_symbol_tb: checks every multiplexer-based symbol T1..T15 on all 16 inputs.
//
// Instantiates mux_symbol once for each K = 1..15, drives the shared 4-bit
// input through all values in counting order (one value per clock), and
// compares each symbol's output with the thermometer rule t = (b >= K)
// computed here. Each symbol must also be seen at both 0 and 1. Watchdog:
// 500 cycles.
module mux_symbol_tb;
  import b2t_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  bin_t          b;
  logic [15:1]   t;
  logic [15:1]   seen0, seen1;

  for (genvar k = 1; k <= 15; k++) begin : g_dut
    mux_symbol #(.K(k)) dut (.b(b), .t(t[k]));
  end

  initial begin
    b = '0;
    seen0 = '0;
    seen1 = '0;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk);
      b = bin_t'(v);
      @(posedge clk);
      for (int k = 1; k <= 15; k++) begin
        checks++;
        if (t[k] !== (v >= k)) begin
          failures++;
          $display("FAIL T%0d: b=%0d t=%b expected %b", k, v, t[k], v >= k);
        end
        if (t[k]) seen1[k] = 1'b1; else seen0[k] = 1'b1;
      end
    end
    checks++;
    if (seen0 != '1 || seen1 != '1) begin
      failures++;
      $display("FAIL some symbol never toggled: seen0=%b seen1=%b", seen0, seen1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
