// tb_rev_full_subtractor: checks the 16-gate reversible full subtractor.
// With the constant lines at FS_ANCILLA, all eight combinations of minuend x,
// subtrahend y and borrow-in z must give x - y - z as difference and borrow.
// The whole 19-line circuit must be reversible: all 2**19 values of its input
// lines are applied and the 19 output lines must never repeat.
module tb_rev_full_subtractor;
  import rev_pkg::*;
  int checks = 0, failures = 0;

  logic x, y, z, difference, borrow;
  logic [FS_GATES-1:0]   ancilla;
  logic [FS_GARBAGE-1:0] garbage;
  logic [18:0] out_lines;
  bit seen [2**19];
  int repeats, d;

  rev_full_subtractor dut (.x(x), .y(y), .z(z), .ancilla(ancilla),
                           .difference(difference), .borrow(borrow),
                           .garbage(garbage));

  assign out_lines = {garbage, borrow, difference};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (xyz=%0b%0b%0b anc=%b diff=%0b borrow=%0b)",
               what, x, y, z, ancilla, difference, borrow);
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
    check(3 + FS_GATES == 2 + FS_GARBAGE, "line count");
    ancilla = FS_ANCILLA;
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      d = int'(x) - int'(y) - int'(z);
      check(difference == d[0], "difference");
      check(borrow == (d < 0), "borrow");
    end
    repeats = 0;
    for (int v = 0; v < 2**19; v++) begin
      {ancilla, x, y, z} = 19'(v);
      #1;
      if (seen[out_lines]) repeats++;
      seen[out_lines] = 1'b1;
    end
    check(repeats == 0, "reversible: all 2**19 output vectors distinct");
    if (repeats != 0) $display("  %0d repeated output vectors", repeats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
