// tb_rev_full_adder: checks the 18-gate reversible full adder.
// With the constant lines at FA_ANCILLA, all eight input combinations must
// give {carry, sum} = a + b + c. The circuit as a whole must be reversible:
// every one of the 2**21 values of its 21 input lines (3 data + 18 constant)
// is applied and the 21 output lines (sum, carry, 19 garbage) must never
// repeat, i.e. the mapping is a bijection.
module tb_rev_full_adder;
  import rev_pkg::*;
  int checks = 0, failures = 0;

  logic a, b, c, sum, carry;
  logic [FA_GATES-1:0]   ancilla;
  logic [FA_GARBAGE-1:0] garbage;
  logic [20:0] out_lines;
  bit seen [2**21];
  int repeats;

  rev_full_adder dut (.a(a), .b(b), .c(c), .ancilla(ancilla),
                      .sum(sum), .carry(carry), .garbage(garbage));

  assign out_lines = {garbage, carry, sum};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (abc=%0b%0b%0b anc=%b sum=%0b carry=%0b)",
               what, a, b, c, ancilla, sum, carry);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(3 + FA_GATES == 2 + FA_GARBAGE, "line count");
    ancilla = FA_ANCILLA;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check({carry, sum} == 2'(int'(a) + int'(b) + int'(c)), "a + b + c");
    end
    repeats = 0;
    for (int v = 0; v < 2**21; v++) begin
      {ancilla, a, b, c} = 21'(v);
      #1;
      if (seen[out_lines]) repeats++;
      seen[out_lines] = 1'b1;
    end
    check(repeats == 0, "reversible: all 2**21 output vectors distinct");
    if (repeats != 0) $display("  %0d repeated output vectors", repeats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
