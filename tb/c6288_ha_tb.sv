// c6288_ha_tb: exhaustive check of the half adder cell: 2*co + s == a + b.
module c6288_ha_tb;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  c6288_ha dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (int'({co, s}) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> co=%0b s=%0b", a, b, co, s);
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
