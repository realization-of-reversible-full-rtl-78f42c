// tb_rev_and_array: checks the reversible AND array (minterm decoder).
// A 3-input array (the default) and a 4-input array are driven with every
// input value; the word lines must be exactly one-hot at position x. The
// line count of a reversible network is also checked: inputs plus constant
// lines must equal word lines plus garbage lines.
module tb_rev_and_array;
  import rev_pkg::*;
  int checks = 0, failures = 0;

  logic [2:0]  x3;
  logic [7:0]  m3;
  logic [and_garbage(3)-1:0] g3;
  logic [3:0]  x4;
  logic [15:0] m4;
  logic [and_garbage(4)-1:0] g4;

  rev_and_array                dut3 (.x(x3), .minterm(m3), .garbage(g3));
  rev_and_array #(.N(4))       dut4 (.x(x4), .minterm(m4), .garbage(g4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (x3=%0d m3=%b x4=%0d m4=%b)", what, x3, m3, x4, m4);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(3 + and_ancilla(3) == 8 + and_garbage(3), "line count N=3");
    check(and_garbage(3) == 10 && and_ancilla(3) == 15, "N=3 sizes");
    check(4 + and_ancilla(4) == 16 + and_garbage(4), "line count N=4");
    for (int v = 0; v < 16; v++) begin
      x3 = 3'(v);
      x4 = 4'(v);
      #1;
      for (int j = 0; j < 8; j++)
        check(m3[j] == (j == (v % 8)), "N=3 word line");
      for (int j = 0; j < 16; j++)
        check(m4[j] == (j == v), "N=4 word line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
