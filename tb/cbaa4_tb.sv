// Self-checking testbench for the CBAA IV approximate full adder.
//
// Applies all eight input patterns, one per clock cycle, and compares carry
// and sum with a truth table written out as a constant (carry = majority(a, b, c),
// sum = ~carry): bit {a,b,c} of CARRY_TT is the expected carry. Also counts
// how many patterns give the exact full-adder value, a+b+c = 2*carry + sum.
// A watchdog ends the run as failed after 100 cycles.
module cbaa4_tb;

  localparam logic [7:0] CARRY_TT = 8'hE8;

  logic clk = 1'b0;
  logic a, b, c, carry, sum;
  int   checks = 0, failures = 0, exact_rows = 0;

  always #5 clk = ~clk;

  cbaa4 dut (.a(a), .b(b), .c(c), .carry(carry), .sum(sum));

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      @(posedge clk);
      checks++;
      if (carry !== CARRY_TT[i]) begin
        failures++;
        $display("FAIL abc=%03b carry=%b expected %b", 3'(i), carry, CARRY_TT[i]);
      end
      checks++;
      if (sum !== ~CARRY_TT[i]) begin
        failures++;
        $display("FAIL abc=%03b sum=%b expected %b", 3'(i), sum, ~CARRY_TT[i]);
      end
      if (2 * int'(carry) + int'(sum) == int'(a) + int'(b) + int'(c)) exact_rows++;
    end
    $display("exact rows: %0d of 8", exact_rows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
