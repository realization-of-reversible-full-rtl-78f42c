// tb_fredkin_gate: exhaustive check of the Fredkin gate.
// The expected outputs come from its swap description (x2 and x3 exchanged
// when x1 = 1). Also checked: the gate is a bijection, it keeps the number of
// ones (conservative), it is self-inverse, x3 = 0 gives AND on y3 and x3 = 1
// gives OR on y2.
module tb_fredkin_gate;
  int checks = 0, failures = 0;
  logic x1, x2, x3, y1, y2, y3, z1, z2, z3;
  logic [2:0] exp_y;
  bit seen [8];

  fredkin_gate dut  (.x1(x1), .x2(x2), .x3(x3), .y1(y1), .y2(y2), .y3(y3));
  fredkin_gate dut2 (.x1(y1), .x2(y2), .x3(y3), .y1(z1), .y2(z2), .y3(z3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (x=%0b%0b%0b y=%0b%0b%0b)", what, x1, x2, x3, y1, y2, y3);
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
    for (int v = 0; v < 8; v++) begin
      {x1, x2, x3} = 3'(v);
      #1;
      exp_y = x1 ? {x1, x3, x2} : {x1, x2, x3};
      check({y1, y2, y3} == exp_y, "controlled swap");
      check($countones({y1, y2, y3}) == $countones({x1, x2, x3}), "conservative");
      check(!seen[{y1, y2, y3}], "outputs distinct");
      seen[{y1, y2, y3}] = 1'b1;
      check({z1, z2, z3} == {x1, x2, x3}, "self-inverse");
      if (!x3) check(y3 == (x1 && x2), "AND use");
      else     check(y2 == (x1 || x2), "OR use");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
