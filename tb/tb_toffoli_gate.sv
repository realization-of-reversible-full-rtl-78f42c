// tb_toffoli_gate: exhaustive check of the Toffoli gate.
// For all eight inputs: p = a, q = b, r flips c exactly when a and b are both
// 1; the eight outputs are distinct; a second gate restores the inputs; with
// c = 0, r is the AND of a and b.
module tb_toffoli_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r, p2, q2, r2;
  bit seen [8];

  toffoli_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  toffoli_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (abc=%0b%0b%0b pqr=%0b%0b%0b)", what, a, b, c, p, q, r);
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
      {a, b, c} = 3'(v);
      #1;
      check(p == a && q == b, "controls pass through");
      check(r == ((v == 6 || v == 7) ? !c : c), "target flips only for a=b=1");
      check(!seen[{p, q, r}], "outputs distinct");
      seen[{p, q, r}] = 1'b1;
      check({p2, q2, r2} == {a, b, c}, "self-inverse");
      if (!c) check(r == (a && b), "AND use");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
