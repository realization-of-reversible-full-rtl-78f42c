// tb_rpla: checks the 3-input, 2-output reversible PLA.
// Every one of the 256 programs is loaded on output 0 (with its bitwise
// complement on output 1) and every input is applied: f[o] must equal bit x of
// prog[o], i.e. the RPLA realises every 3-input function. The full adder and
// full subtractor programs are then checked against arithmetic. Finally the
// network is checked for lost information: over all 2**19 combinations of
// the 3 inputs and the 16 program bits, the 68 output lines (f and garbage)
// must never repeat, as a reversible network with fixed constant lines
// requires.
module tb_rpla;
  import rev_pkg::*;
  int checks = 0, failures = 0;

  logic [2:0]      x;
  logic [1:0][7:0] prog;
  logic [1:0]      f;
  logic [and_garbage(3)+or_garbage(8,2)-1:0] g;
  int s, d, repeats;
  bit seen [logic [67:0]];

  rpla dut (.x(x), .prog(prog), .f(f), .garbage(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (x=%b prog=%h f=%b)", what, x, prog, f);
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
    for (int p = 0; p < 256; p++) begin
      prog = {~8'(p), 8'(p)};
      for (int v = 0; v < 8; v++) begin
        x = 3'(v);
        #1;
        check(f[0] == p[v], "function on output 0");
        check(f[1] == !p[v], "function on output 1");
      end
    end
    prog = {PROG_CARRY, PROG_SUM};
    for (int v = 0; v < 8; v++) begin
      x = 3'(v);
      #1;
      s = int'(x[2]) + int'(x[1]) + int'(x[0]);
      check(f == 2'(s), "full adder program");
    end
    prog = {PROG_BORROW, PROG_DIFF};
    for (int v = 0; v < 8; v++) begin
      x = 3'(v);
      #1;
      d = int'(x[2]) - int'(x[1]) - int'(x[0]);
      check(f[0] == d[0] && f[1] == (d < 0), "full subtractor program");
    end
    repeats = 0;
    for (int v = 0; v < 2**19; v++) begin
      {prog, x} = 19'(v);
      #1;
      if (seen.exists({g, f})) repeats++;
      seen[{g, f}] = 1'b1;
    end
    check(repeats == 0, "no two input/program combinations give the same output lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
