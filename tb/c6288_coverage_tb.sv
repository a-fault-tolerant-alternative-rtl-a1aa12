// c6288_coverage_tb: single stuck-at fault coverage of the PE under a fixed
// set of 1,200 pseudorandom patterns.
//
// The patterns come from a 32-bit maximal-length Galois LFSR (taps
// 0x80200003, seed 0xACE1_2345), a = high half, b = low half. For every
// fault site of the PE and both stuck values, the patterns are applied in
// order until the product differs from a*b; the index of the first
// detecting pattern is recorded. Reported: faults detected within the first
// 150 and within all 1,200 patterns, and the pattern-set size at which
// every fault is detected. Each fault must be detected within 1,200
// patterns (every net of the adder array changes the product when it is
// forced to the opposite value).
module c6288_coverage_tb;
  import tdv_pkg::*;
  localparam int N_PAT = 1200;

  op_t    a, b;
  fault_t fault;
  res_t   p;
  int checks = 0, failures = 0;

  c6288_pe dut (.a(a), .b(b), .fault(fault), .p(p));

  op_t pa [N_PAT];
  op_t pb [N_PAT];

  initial begin
    logic [31:0] lfsr;
    int cov150, cov1200, worst;
    lfsr = 32'hACE1_2345;
    for (int n = 0; n < N_PAT; n++) begin
      lfsr = lfsr[0] ? ((lfsr >> 1) ^ 32'h8020_0003) : (lfsr >> 1);
      pa[n] = lfsr[31:16];
      pb[n] = lfsr[15:0];
    end
    cov150 = 0; cov1200 = 0; worst = 0;
    for (int f = 0; f < 2 * N_FAULT_SITES; f++) begin
      int first;
      fault.en    = 1'b1;
      fault.site  = SITE_W'(f / 2);
      fault.value = 1'(f % 2);
      first = -1;
      for (int n = 0; n < N_PAT && first < 0; n++) begin
        a = pa[n]; b = pb[n];
        #1;
        if (p != res_t'(a) * res_t'(b)) first = n;
      end
      checks++;
      if (first < 0) begin
        failures++;
        $display("FAIL site %0d stuck-at-%0d not detected", f / 2, f % 2);
      end else begin
        cov1200++;
        if (first < 150) cov150++;
        if (first + 1 > worst) worst = first + 1;
      end
    end
    $display("faults=%0d detected: within 150 patterns=%0d, within 1200=%0d; all detected after %0d patterns",
             2 * N_FAULT_SITES, cov150, cov1200, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
