// tb_rev_or_array: checks the programmable reversible OR array.
// The default 8x2 array gets every one-hot word (as the AND array delivers)
// with random programs, and also random multi-hot words; each output must be
// the OR of the selected word lines. A 4x3 array is checked exhaustively over
// its word values with random programs. The word lines must also leave the
// array unchanged at the end of the garbage bus.
module tb_rev_or_array;
  import rev_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]       w8;
  logic [1:0][7:0]  p8;
  logic [1:0]       f8;
  logic [or_garbage(8,2)-1:0] g8;
  logic [3:0]       w4;
  logic [2:0][3:0]  p4;
  logic [2:0]       f4;
  logic [or_garbage(4,3)-1:0] g4;

  rev_or_array                 dut8 (.word(w8), .prog(p8), .f(f8), .garbage(g8));
  rev_or_array #(.K(4), .M(3)) dut4 (.word(w4), .prog(p4), .f(f4), .garbage(g4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (w8=%b p8=%h f8=%b w4=%b p4=%h f4=%b)", what, w8, p8, f8, w4, p4, f4);
    end
  endtask

  function automatic bit any_sel(logic [7:0] w, logic [7:0] p);
    for (int j = 0; j < 8; j++) if (w[j] && p[j]) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      w8 = (t < 200) ? (8'd1 << (t % 8)) : 8'($urandom);
      p8 = 16'($urandom);
      if (t % 50 == 0) p8 = '0;
      if (t % 50 == 1) p8 = '1;
      w4 = 4'(t);
      p4 = 12'($urandom);
      #1;
      for (int o = 0; o < 2; o++)
        check(f8[o] == any_sel(w8, p8[o]), "8x2 output");
      check(g8[48 +: 8] == w8, "8x2 word lines pass through");
      for (int o = 0; o < 3; o++)
        check(f4[o] == |(w4 & p4[o]), "4x3 output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
