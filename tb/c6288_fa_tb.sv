// c6288_fa_tb: exhaustive check of the full adder cell: for all eight input
// combinations, 2*co + s must equal a + b + ci.
module c6288_fa_tb;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  c6288_fa dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if (int'({co, s}) != int'(a) + int'(b) + int'(ci)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
