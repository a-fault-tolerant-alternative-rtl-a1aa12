// c6288_pe_tb: checks the array multiplier PE.
//  * fault-free: corner operands and random operands against a*b;
//  * stuck-at faults on partial products and on top-row adder outputs:
//    the array adds every bit it is given exactly, so forcing a net of
//    weight 2^w from value o to value v must change the product by
//    (v - o) * 2^w. The expected net value o is worked out from the
//    operands here, independently of the PE.
module c6288_pe_tb;
  import tdv_pkg::*;

  op_t    a, b;
  fault_t fault;
  res_t   p;
  int checks = 0, failures = 0;

  c6288_pe dut (.a(a), .b(b), .fault(fault), .p(p));

  task automatic check(input res_t exp, input string what);
    #1;
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h fault=%b/%0d/%b p=%h exp=%h",
               what, a, b, fault.en, fault.site, fault.value, p, exp);
    end
  endtask

  function automatic res_t shifted(input int signed d, input int w);
    longint e;
    e = longint'(d) <<< w;
    return res_t'(e);
  endfunction

  initial begin
    fault = '0;
    // Corner cases.
    a = '0;    b = '0;    check(0, "zero");
    a = '1;    b = '1;    check(32'hFFFE_0001, "max");
    a = 16'h8000; b = 16'h8000; check(32'h4000_0000, "msb");
    a = 16'h0001; b = 16'hFFFF; check(32'h0000_FFFF, "one");
    // Random fault-free products.
    for (int n = 0; n < 2000; n++) begin
      a = op_t'($urandom);
      b = op_t'($urandom);
      check(res_t'(a) * res_t'(b), "random");
    end
    // Stuck-at faults on partial products.
    for (int n = 0; n < 2000; n++) begin
      int i, j;
      logic o;
      i = int'($urandom_range(15, 0));
      j = int'($urandom_range(15, 0));
      a = op_t'($urandom);
      b = op_t'($urandom);
      fault.en    = 1'b1;
      fault.site  = SITE_W'(j * 16 + i);
      fault.value = 1'($urandom);
      o = a[i] & b[j];
      check(res_t'(a) * res_t'(b) + shifted(int'(fault.value) - int'(o), i + j), "pp fault");
    end
    // Stuck-at faults on the sum and carry outputs of the top-row half adders.
    for (int n = 0; n < 2000; n++) begin
      int i, w;
      logic x, y, o, is_carry;
      i = int'($urandom_range(14, 0));
      is_carry = 1'($urandom);
      a = op_t'($urandom);
      b = op_t'($urandom);
      x = a[i+1] & b[0];
      y = a[i] & b[1];
      o = is_carry ? (x & y) : (x ^ y);
      w = is_carry ? i + 2 : i + 1;
      fault.en    = 1'b1;
      fault.site  = SITE_W'(256 + 2 * i + int'(is_carry));
      fault.value = 1'($urandom);
      check(res_t'(a) * res_t'(b) + shifted(int'(fault.value) - int'(o), w), "ha fault");
    end
    // Product bit 31 is the last ripple carry (cell 239): forcing it to 1
    // must set bit 31 when the true product is below 2^31.
    a = 16'h0003; b = 16'h0005;
    fault.en = 1'b1; fault.site = SITE_W'(256 + 2 * 239 + 1); fault.value = 1'b1;
    check(32'h8000_000F, "ripple carry fault");
    // A disabled fault has no effect.
    fault.en = 1'b0;
    check(32'h0000_000F, "fault disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
