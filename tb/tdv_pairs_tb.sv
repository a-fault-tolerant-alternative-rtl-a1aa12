// tdv_pairs_tb: TDV over many random fault pairs, at default parameters.
//
// PE0 is healthy (golden); PE1 and PE2 each get one random stuck-at fault
// (any of the PE's fault sites, either stuck value, different sites). For
// each pair the weights are cleared and N_PAT pseudorandom patterns are sent
// to all three PEs; the run counts as correct when PE0 ends as the golden
// PE. Reported: correct, incorrect and undecided pairs, and pairs that saw
// aliasing (both faulty PEs agreeing on a wrong result, i.e. PE0 outvoted).
// Checks, independent of the fault values:
//  * every pattern is voted once;
//  * weight bookkeeping: each minority vote adds +1 to the sum of the
//    weights, so the sum equals the number of minority votes;
//  * TDV never turns on a healthy PE without aliasing: in a run where PE0
//    was never the minority and any vote disagreed, PE0 must be golden.
module tdv_pairs_tb;
  import tdv_pkg::*;
  localparam int unsigned DEPTH    = 8;
  localparam int unsigned WEIGHT_W = 16;
  localparam int N_PAIRS = 1000;
  localparam int N_PAT   = 200;

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
  int n_votes, n_min, n_min0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    if (vote_valid) begin
      n_votes++;
      if (vote_outcome inside {VOTE_MINORITY_0, VOTE_MINORITY_1, VOTE_MINORITY_2}) n_min++;
      if (vote_outcome == VOTE_MINORITY_0) n_min0++;
    end
  end

  initial begin
    automatic int correct = 0, wrong = 0, undecided = 0, aliased = 0;
    for (int i = 0; i < N_PE; i++) begin
      in_valid[i] = 0; in_a[i] = '0; in_b[i] = '0; fault[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pr = 0; pr < N_PAIRS; pr++) begin
      int s1, s2, wsum;
      @(negedge clk);
      s1 = int'($urandom_range(N_FAULT_SITES - 1, 0));
      do s2 = int'($urandom_range(N_FAULT_SITES - 1, 0)); while (s2 == s1);
      fault[0] = '0;
      fault[1] = '{en: 1'b1, site: SITE_W'(s1), value: 1'($urandom)};
      fault[2] = '{en: 1'b1, site: SITE_W'(s2), value: 1'($urandom)};
      clear_weights = 1;
      @(negedge clk);
      clear_weights = 0;
      n_votes = 0; n_min = 0; n_min0 = 0;
      for (int n = 0; n < N_PAT; n++) begin
        op_t a, b;
        logic done [N_PE];
        a = op_t'($urandom); b = op_t'($urandom);
        for (int i = 0; i < N_PE; i++) begin
          in_valid[i] = 1; in_a[i] = a; in_b[i] = b; done[i] = 0;
        end
        while (!(done[0] && done[1] && done[2])) begin
          @(posedge clk);
          for (int i = 0; i < N_PE; i++) if (in_valid[i] && in_ready[i]) done[i] = 1;
          @(negedge clk);
          for (int i = 0; i < N_PE; i++) if (done[i]) in_valid[i] = 0;
        end
      end
      repeat (6) @(negedge clk);
      chk(n_votes == N_PAT, "one vote per pattern");
      wsum = int'(weight[0]) + int'(weight[1]) + int'(weight[2]);
      chk(wsum == n_min, "weight sum equals minority votes");
      if (n_min0 == 0 && n_min > 0) chk(golden_valid && golden_id == 0, "golden PE kept without aliasing");
      if (n_min0 > 0) aliased++;
      if (!golden_valid) undecided++;
      else if (golden_id == 0) correct++;
      else wrong++;
    end
    $display("pairs=%0d patterns=%0d correct=%0d incorrect=%0d undecided=%0d aliasing_pairs=%0d",
             N_PAIRS, N_PAT, correct, wrong, undecided, aliased);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
