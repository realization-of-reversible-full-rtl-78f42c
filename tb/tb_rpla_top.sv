// tb_rpla_top: end-to-end test of the RPLA top level at its default sizes.
// The programmable RPLA is switched between three programs in turn: the full
// adder program, the full subtractor program and random two-output programs.
// In the adder and subtractor modes the same operands go to the RPLA and to
// the dedicated pruned circuit, and both must agree with each other and with
// integer arithmetic; in random mode the RPLA output must be the program bit
// selected by the input. The number of program switches and of input vectors
// seen in each mode are counted, and a mode that never ran counts a failure.
// A multi-bit ripple add and subtract made by chaining the one-bit circuits
// over consecutive calls checks the carry and borrow in context.
module tb_rpla_top;
  import rev_pkg::*;
  int checks = 0, failures = 0;

  typedef enum logic [1:0] {MODE_ADD, MODE_SUB, MODE_CUSTOM} mode_e;

  logic [2:0]      pla_x;
  logic [1:0][7:0] pla_prog;
  logic [1:0]      pla_f;
  logic [and_garbage(3)+or_garbage(8,2)-1:0] pla_garbage;
  logic fa_a, fa_b, fa_cin, fa_sum, fa_carry;
  logic [FA_GARBAGE-1:0] fa_garbage;
  logic fs_x, fs_y, fs_bin, fs_diff, fs_borrow;
  logic [FS_GARBAGE-1:0] fs_garbage;

  int mode_count [3];
  int switches = 0;
  mode_e cur_mode;

  rpla_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (mode=%s x=%b prog=%h f=%b fa=%0b%0b fs=%0b%0b)", what,
               cur_mode.name(), pla_x, pla_prog, pla_f, fa_carry, fa_sum,
               fs_borrow, fs_diff);
    end
  endtask

  // Program switches are counted where the program input actually changes.
  always @(pla_prog) switches++;

  task automatic load(input mode_e m, input logic [1:0][7:0] p);
    cur_mode = m;
    pla_prog = p;
  endtask

  // One bit of the add and subtract: all three circuits get the operands.
  task automatic apply(input logic a, input logic b, input logic ci);
    {pla_x} = {a, b, ci};
    {fa_a, fa_b, fa_cin} = {a, b, ci};
    {fs_x, fs_y, fs_bin} = {a, b, ci};
    #1;
    mode_count[cur_mode]++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] opa, opb, res;
    logic       cy;
    int         d;
    logic [1:0][7:0] rp;

    cur_mode = MODE_CUSTOM;
    pla_prog = '0;
    #1 switches = 0;
    for (int round = 0; round < 20; round++) begin
      // adder mode: exhaustive one-bit, then an 8-bit ripple add
      load(MODE_ADD, {PROG_CARRY, PROG_SUM});
      for (int v = 0; v < 8; v++) begin
        apply(v[2], v[1], v[0]);
        check({fa_carry, fa_sum} == 2'(int'(v[2]) + int'(v[1]) + int'(v[0])), "dedicated adder");
        check(pla_f == {fa_carry, fa_sum}, "RPLA adder = dedicated adder");
      end
      opa = 8'($urandom); opb = 8'($urandom); cy = 1'b0;
      for (int i = 0; i < 8; i++) begin
        apply(opa[i], opb[i], cy);
        res[i] = pla_f[0];
        cy = pla_f[1];
      end
      check({cy, res} == 9'(opa) + 9'(opb), "8-bit ripple add on the RPLA");

      // subtractor mode
      load(MODE_SUB, {PROG_BORROW, PROG_DIFF});
      for (int v = 0; v < 8; v++) begin
        apply(v[2], v[1], v[0]);
        d = int'(v[2]) - int'(v[1]) - int'(v[0]);
        check(fs_diff == d[0] && fs_borrow == (d < 0), "dedicated subtractor");
        check(pla_f == {fs_borrow, fs_diff}, "RPLA subtractor = dedicated subtractor");
      end
      opa = 8'($urandom); opb = 8'($urandom); cy = 1'b0;
      for (int i = 0; i < 8; i++) begin
        apply(opa[i], opb[i], cy);
        check(fs_diff == pla_f[0] && fs_borrow == pla_f[1], "ripple step agrees");
        res[i] = fs_diff;
        cy = fs_borrow;
      end
      check(res == opa - opb && cy == (opa < opb), "8-bit ripple subtract");

      // custom mode: any pair of 3-input functions
      rp = 16'($urandom);
      load(MODE_CUSTOM, rp);
      for (int v = 0; v < 8; v++) begin
        apply(v[2], v[1], v[0]);
        check(pla_f[0] == rp[0][v] && pla_f[1] == rp[1][v], "custom program");
      end
    end

    check(mode_count[MODE_ADD] > 0, "adder mode exercised");
    check(mode_count[MODE_SUB] > 0, "subtractor mode exercised");
    check(mode_count[MODE_CUSTOM] > 0, "custom mode exercised");
    check(switches > 0, "program switched");
    $display("vectors: add=%0d sub=%0d custom=%0d, program switches=%0d",
             mode_count[MODE_ADD], mode_count[MODE_SUB], mode_count[MODE_CUSTOM], switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
