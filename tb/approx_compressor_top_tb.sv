// End-to-end testbench for the top level holding both approximate 4:2
// compressors.
//
// Runs every one of the 32 input patterns through the top, one per clock
// cycle, and checks all six outputs against the truth-table reference model
// (approx_compressor_ref). For each design it also counts how the encoded
// value Sum + 2*(Cout + Carry) relates to the exact count X1+X2+X3+X4+Cin:
// exact, too high, too low, plus the patterns on which the two designs give
// different outputs. Each of these cases must occur at least once, and the
// inexact-pattern totals must match the hand-derived 17 (design I) and 12
// (design II). The top has no parameters, so this run is also at full size.
// A watchdog ends the run as failed after 200 cycles.
module approx_compressor_top_tb;

  import compressor_pkg::*;
  import approx_compressor_ref::*;

  localparam int NUM_IN_PATTERNS = 32;

  logic      clk = 1'b0;
  comp_in_t  x;
  comp_out_t y1, y2;
  int        checks = 0, failures = 0;
  int        n_exact[2], n_over[2], n_under[2];
  int        n_disagree = 0;

  always #5 clk = ~clk;

  approx_compressor_top dut (.x(x), .y1(y1), .y2(y2));

  task automatic check_out(input int variant, input comp_out_t got);
    comp_out_t e;
    int        v;
    e = expected(variant, x);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL design %0d x=%05b got {cout,carry,sum}=%03b expected %03b",
               variant, x, got, e);
    end
    v = encoded_value(got);
    if (v == exact_value(x))     n_exact[variant-1]++;
    else if (v > exact_value(x)) n_over[variant-1]++;
    else                         n_under[variant-1]++;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL case never seen: %s", what);
    end
    $display("%-28s %0d", what, count);
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++) begin
      n_exact[d] = 0;
      n_over[d]  = 0;
      n_under[d] = 0;
    end
    for (int i = 0; i < NUM_IN_PATTERNS; i++) begin
      x = comp_in_t'(i);
      @(posedge clk);
      check_out(1, y1);
      check_out(2, y2);
      if (y1 != y2) n_disagree++;
    end
    require("design I exact", n_exact[0]);
    require("design I too high", n_over[0]);
    require("design I too low", n_under[0]);
    require("design II exact", n_exact[1]);
    require("design II too high", n_over[1]);
    require("design II too low", n_under[1]);
    require("designs disagree", n_disagree);
    checks++;
    if (n_over[0] + n_under[0] != 17 || n_over[1] + n_under[1] != 12) begin
      failures++;
      $display("FAIL inexact totals %0d / %0d, expected 17 / 12",
               n_over[0] + n_under[0], n_over[1] + n_under[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
