// tdv_top_tb: end-to-end run of the TDV system at its default parameters.
//
// Each scenario clears the weights, injects stuck-at faults into some PEs
// and sends the same 1,200 pseudorandom input patterns down all three
// streams (random gaps per stream, so the streams are skewed by up to half
// the CAM depth), as in a TDV
// evaluation of one fault pair. A reference model computes every PE's
// result from the operands and the injected partial-product fault (forcing
// pp[j][i] from o to v changes the product by (v - o) * 2^(i+j)), the vote
// outcome, the weight changes and the system result, and checks each vote.
// Scenarios: fault-free; one faulty PE (the case lockstep TMR covers); two
// faulty PEs with different faults; two faulty PEs whose faults alias
// (same weight, same direction); and a healthy PE2 with stream 2 lagging the
// others by more than the CAM depth, so that part of the results are dropped
// and never voted on.
// Mechanisms counted, each must occur: every vote outcome, PE stalls, CAM
// drops, a no-majority vote resolved by the golden PE, and the golden PE
// identified correctly at the end of a run.
module tdv_top_tb;
  import tdv_pkg::*;
  localparam int unsigned DEPTH    = 8;   // tdv_top defaults
  localparam int unsigned WEIGHT_W = 16;
  localparam int          N_PAT    = 1200;

  logic clk = 0, rst_n = 0, clear_weights = 0;
  logic in_valid [N_PE];
  logic in_ready [N_PE];
  op_t  in_a [N_PE];
  op_t  in_b [N_PE];
  fault_t fault [N_PE];
  logic vote_valid, vote_result_ok, golden_valid;
  key_t vote_key;
  vote_outcome_e vote_outcome;
  res_t vote_result;
  logic signed [WEIGHT_W-1:0] weight [N_PE];
  pe_id_t golden_id;
  logic drop [N_PE];
  logic [$clog2(DEPTH+1)-1:0] cam_count [N_PE];

  tdv_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_outcome [5];
  int n_votes = 0, n_stalls = 0, n_drops = 0, n_golden_pick = 0, n_golden_ok = 0;
  int m_w [N_PE];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference PE: product plus the effect of a partial-product fault.
  function automatic res_t model_pe(input op_t a, input op_t b, input fault_t f);
    longint p;
    int i, j;
    p = longint'(a) * longint'(b);
    if (f.en) begin
      j = int'(f.site) / 16;
      i = int'(f.site) % 16;
      p += (longint'(f.value) - longint'(a[i] & b[j] ? 1 : 0)) <<< (i + j);
    end
    return res_t'(p);
  endfunction

  function automatic int model_golden();
    if (m_w[0] >= m_w[1] && m_w[0] >= m_w[2]) return 0;
    if (m_w[1] >= m_w[2]) return 1;
    return 2;
  endfunction

  // Check every vote against the reference model.
  always @(posedge clk) if (rst_n) begin
    #1;
    if (vote_valid) begin
      res_t r [N_PE];
      int eo, g;
      logic gv;
      res_t eres;
      n_votes++;
      for (int i = 0; i < N_PE; i++) r[i] = model_pe(vote_key[31:16], vote_key[15:0], fault[i]);
      g  = model_golden();
      gv = !(m_w[0] == m_w[1] && m_w[1] == m_w[2]);
      if (r[0] == r[1] && r[1] == r[2])      begin eo = 0; eres = r[0]; end
      else if (r[1] == r[2]) begin eo = 1; eres = r[1]; m_w[0]--; m_w[1]++; m_w[2]++; end
      else if (r[0] == r[2]) begin eo = 2; eres = r[0]; m_w[0]++; m_w[1]--; m_w[2]++; end
      else if (r[0] == r[1]) begin eo = 3; eres = r[0]; m_w[0]++; m_w[1]++; m_w[2]--; end
      else begin eo = 4; eres = r[g]; end
      n_outcome[eo]++;
      chk(int'(vote_outcome) == eo, "vote outcome");
      chk(vote_result == eres, "vote result");
      chk(vote_result_ok == (eo != 4 || gv), "vote result ok");
      if (eo == 4 && gv) n_golden_pick++;
      for (int i = 0; i < N_PE; i++) chk(int'(weight[i]) == m_w[i], "weight");
    end
    for (int i = 0; i < N_PE; i++) begin
      if (in_valid[i] && !in_ready[i]) n_stalls++;
      if (drop[i]) n_drops++;
    end
  end

  op_t pat_a [N_PAT];
  op_t pat_b [N_PAT];

  // Patterns sent per stream; a stream waits rather than run more than
  // `skew` patterns ahead of the slowest one.
  int sent [N_PE];

  function automatic int slowest();
    int m;
    m = sent[0];
    for (int i = 1; i < N_PE; i++) if (sent[i] < m) m = sent[i];
    return m;
  endfunction

  task automatic send(input int pe, input int gap, input int lag, input int skew);
    repeat (lag) @(negedge clk);
    for (int n = 0; n < N_PAT; n++) begin
      repeat ($urandom_range(gap, 0)) @(negedge clk);
      while (n - slowest() > skew) @(negedge clk);
      in_valid[pe] = 1; in_a[pe] = pat_a[n]; in_b[pe] = pat_b[n];
      do @(posedge clk); while (!in_ready[pe]);
      @(negedge clk);
      in_valid[pe] = 0;
      sent[pe] = n + 1;
    end
  endtask

  function automatic fault_t pp_fault(input int j, input int i, input logic v);
    fault_t f;
    f.en = 1; f.site = SITE_W'(j * 16 + i); f.value = v;
    return f;
  endfunction

  // One TDV evaluation: clear, set faults, stream the patterns, check.
  task automatic run(input string name, input fault_t f0, input fault_t f1,
                     input fault_t f2, input int lag2, input int golden_pe,
                     input logic expect_all_votes);
    int v0;
    @(negedge clk);
    fault[0] = f0; fault[1] = f1; fault[2] = f2;
    clear_weights = 1;
    @(negedge clk);
    clear_weights = 0;
    for (int i = 0; i < N_PE; i++) m_w[i] = 0;
    for (int n = 0; n < N_PAT; n++) begin
      pat_a[n] = op_t'($urandom);
      pat_b[n] = op_t'($urandom);
    end
    v0 = n_votes;
    for (int i = 0; i < N_PE; i++) sent[i] = 0;
    // Skew bounded to half the CAM depth; when stream 2 is made to lag, the
    // bound is raised above the depth so that some results are dropped.
    fork
      send(0, 3, 0, lag2 > 0 ? DEPTH + 4 : DEPTH / 2);
      send(1, 3, 0, lag2 > 0 ? DEPTH + 4 : DEPTH / 2);
      send(2, 3, lag2, lag2 > 0 ? DEPTH + 4 : DEPTH / 2);
    join
    repeat (6) @(negedge clk);
    if (expect_all_votes) chk(n_votes - v0 == N_PAT, "one vote per pattern");
    if (golden_pe >= 0) begin
      if (golden_valid && int'(golden_id) == golden_pe) n_golden_ok++;
    end else begin
      chk(!golden_valid, "fault-free: PEs not told apart");
    end
    $display("%-10s votes=%0d weights=%0d %0d %0d golden=%0d valid=%0b",
             name, n_votes - v0, weight[0], weight[1], weight[2], golden_id, golden_valid);
  endtask

  initial begin
    for (int i = 0; i < N_PE; i++) begin
      in_valid[i] = 0; in_a[i] = '0; in_b[i] = '0; fault[i] = '0;
    end
    for (int k = 0; k < 5; k++) n_outcome[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run("faultfree", '0, '0, '0, 0, -1, 1);
    run("single", '0, '0, pp_fault(4, 7, 1'b0), 0, 0, 1);
    run("pair", '0, pp_fault(3, 5, 1'b0), pp_fault(9, 2, 1'b1), 0, 0, 1);
    run("alias", '0, pp_fault(2, 3, 1'b1), pp_fault(3, 2, 1'b1), 0, 0, 1);
    run("lag", pp_fault(1, 1, 1'b0), pp_fault(8, 8, 1'b1), '0, 5 * DEPTH, 2, 0);
    for (int k = 0; k < 5; k++) chk(n_outcome[k] > 0, "each vote outcome occurs");
    chk(n_stalls > 0, "stalls occur");
    chk(n_drops > 0, "CAM drops occur");
    chk(n_golden_pick > 0, "no-majority vote resolved by golden PE");
    chk(n_golden_ok > 0, "golden PE identified");
    $display("outcomes agree=%0d min0=%0d min1=%0d min2=%0d none=%0d",
             n_outcome[0], n_outcome[1], n_outcome[2], n_outcome[3], n_outcome[4]);
    $display("stalls=%0d drops=%0d golden_picks=%0d golden_ok_runs=%0d of 4",
             n_stalls, n_drops, n_golden_pick, n_golden_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
