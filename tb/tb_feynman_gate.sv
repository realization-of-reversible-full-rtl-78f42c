// tb_feynman_gate: exhaustive check of the Feynman gate.
// All four input pairs are applied; y1/y2 are compared with x1 and x1 xor x2,
// the four outputs must be distinct (the gate is a bijection), a second gate
// fed the outputs must restore the inputs (self-inverse), and the copier
// (x2 = 0) and complementer (x2 = 1) uses are checked by name.
module tb_feynman_gate;
  int checks = 0, failures = 0;
  logic x1, x2, y1, y2, z1, z2;
  bit seen [4];

  feynman_gate dut  (.x1(x1), .x2(x2), .y1(y1), .y2(y2));
  feynman_gate dut2 (.x1(y1), .x2(y2), .y1(z1), .y2(z2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (x1=%0b x2=%0b y=%0b%0b)", what, x1, x2, y1, y2);
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
    for (int v = 0; v < 4; v++) begin
      {x1, x2} = 2'(v);
      #1;
      check(y1 == x1, "y1 = x1");
      check(y2 == (x1 != x2), "y2 = x1 xor x2");
      check(!seen[{y1, y2}], "outputs distinct");
      seen[{y1, y2}] = 1'b1;
      check({z1, z2} == {x1, x2}, "self-inverse");
      if (!x2) check(y2 == x1, "copier");
      else     check(y2 == !x1, "complementer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
