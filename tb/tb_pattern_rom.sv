// tb_pattern_rom: checks the pattern table against the counting-sequence rule
// written out bit by bit here, for a 32-line bus (10 patterns) and for the
// 5-line example (6 patterns: 00001 / 11110 for the first pair, listed with
// line 0 first).  Also checks that every pair of lines differs in some pattern
// and that each line sees both 0 and 1.
module tb_pattern_rom;
  import dti_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  idx32;
  logic [31:0] pat32;
  logic [2:0]  idx5;
  logic [31:0] pat5;

  pattern_rom #(.N_LINES(32)) u_rom32 (.idx(idx32), .pattern(pat32));
  pattern_rom #(.N_LINES(5))  u_rom5  (.idx(idx5),  .pattern(pat5));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] got32 [10];
  logic [31:0] exp;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 32 lines: the reference values, worked out by hand from the rule.
    for (int i = 0; i < 10; i++) begin
      idx32 = 4'(i);
      #1;
      got32[i] = pat32;
      exp = '0;
      for (int l = 0; l < 32; l++) begin
        int b;
        b = (l >> (4 - i / 2)) & 1;
        exp[l] = (i % 2 == 1) ? ~b[0] : b[0];
      end
      check(pat32 == exp, $sformatf("32-line pattern %0d = %h, expected %h", i, pat32, exp));
    end
    check(got32[0] == 32'hFFFF_0000, "first pattern selects the upper half");
    check(got32[1] == 32'h0000_FFFF, "second pattern is the complement");
    check(got32[8] == 32'hAAAA_AAAA, "last true pattern is the label LSB");
    idx32 = 4'd10;
    #1 check(pat32 == 32'h0, "index past the table reads zero");
    // every two lines are told apart by some pattern; every line toggles
    for (int a = 0; a < 32; a++) begin
      logic s0, s1;
      s0 = 0; s1 = 0;
      for (int i = 0; i < 10; i++) begin
        if (got32[i][a]) s1 = 1; else s0 = 1;
      end
      check(s0 && s1, $sformatf("line %0d sees both values", a));
      for (int b = a + 1; b < 32; b++) begin
        logic diff;
        diff = 0;
        for (int i = 0; i < 10; i += 2) if (got32[i][a] != got32[i][b]) diff = 1;
        check(diff, $sformatf("lines %0d and %0d distinguished", a, b));
      end
    end
    // 5-line example: first pattern 00001 (line 0 first), its complement 11110
    idx5 = 3'd0;
    #1 check(pat5[4:0] == 5'b10000, "5-line pattern 0");
    idx5 = 3'd1;
    #1 check(pat5[4:0] == 5'b01111, "5-line pattern 1");
    idx5 = 3'd4;
    #1 check(pat5[4:0] == 5'b01010, "5-line pattern 4 (label LSB)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
