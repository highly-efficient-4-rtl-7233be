// Self-checking testbench for approximate 4:2 compressor design I.
//
// Applies all 32 combinations of X1..X4, Cin, one per clock cycle, and
// compares Cout, Carry and Sum with the reference model built from the
// cells' truth tables (approx_compressor_ref). It also checks that Cout does
// not depend on Cin, and that the number of input patterns whose encoded
// value Sum + 2*(Cout + Carry) differs from X1+X2+X3+X4+Cin is 17, a count
// worked out by hand from the two cell truth tables.
// A watchdog ends the run as failed after 200 cycles.
module approx_compressor1_tb;

  import compressor_pkg::*;
  import approx_compressor_ref::*;

  localparam int NUM_IN_PATTERNS = 32;  // five one-bit inputs
  localparam int EXPECTED_ERROR_PATTERNS = 17;

  logic      clk = 1'b0;
  comp_in_t  x;
  comp_out_t y, e;
  logic      cout_cin0;
  int        checks = 0, failures = 0, error_patterns = 0, abs_error_sum = 0;

  always #5 clk = ~clk;

  approx_compressor1 dut (.x(x), .y(y));

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NUM_IN_PATTERNS; i++) begin
      x = comp_in_t'(i);
      @(posedge clk);
      e = expected(1, x);
      checks++;
      if (y.cout !== e.cout) begin
        failures++;
        $display("FAIL x=%05b cout=%b expected %b", x, y.cout, e.cout);
      end
      checks++;
      if (y.carry !== e.carry) begin
        failures++;
        $display("FAIL x=%05b carry=%b expected %b", x, y.carry, e.carry);
      end
      checks++;
      if (y.sum !== e.sum) begin
        failures++;
        $display("FAIL x=%05b sum=%b expected %b", x, y.sum, e.sum);
      end
      // Patterns arrive with cin=0 then cin=1: Cout must not change.
      if (x.cin == 1'b0) cout_cin0 = y.cout;
      else begin
        checks++;
        if (y.cout !== cout_cin0) begin
          failures++;
          $display("FAIL x=%05b cout depends on cin", x);
        end
      end
      if (encoded_value(y) != exact_value(x)) begin
        error_patterns++;
        abs_error_sum += (encoded_value(y) > exact_value(x)) ?
                         encoded_value(y) - exact_value(x) :
                         exact_value(x) - encoded_value(y);
      end
    end
    checks++;
    if (error_patterns != EXPECTED_ERROR_PATTERNS) begin
      failures++;
      $display("FAIL %0d erroneous patterns, expected %0d", error_patterns,
               EXPECTED_ERROR_PATTERNS);
    end
    $display("design I: %0d of 32 patterns inexact, total |error| %0d",
             error_patterns, abs_error_sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
