// tdv_align_tb: checks voting-opportunity detection and alignment.
// Each PE stream presents keys with a result that encodes both the key and
// the PE number, so every aligned triple can be checked for the right key
// in the right lane. Phases:
//  1. latency: one key to all three PEs, the last one alone; the triple
//     must appear one clock edge after the edge that accepts the last PE's
//     result (holding register, then CAM match into the output register);
//  2. common keys in all three streams, with random gaps and small skew:
//     every key must be voted exactly once and nothing dropped;
//  3. keys seen by only two PEs and one stream lagging by more than the CAM
//     depth: those keys must not be voted, and CAM drops must occur.
// Stalls (in_valid high, in_ready low) must also occur.
module tdv_align_tb;
  import tdv_pkg::*;
  localparam int unsigned DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid [N_PE];
  logic in_ready [N_PE];
  key_t in_key   [N_PE];
  res_t in_res   [N_PE];
  logic out_valid;
  key_t out_key;
  res_t out_res  [N_PE];
  logic drop     [N_PE];
  logic [$clog2(DEPTH+1)-1:0] cam_count [N_PE];

  tdv_align #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_votes = 0, n_drops = 0, n_stalls = 0;
  int voted [key_t];

  function automatic res_t tag(input key_t k, input int pe);
    return res_t'(k * 32'h9E37_79B1) ^ res_t'(pe << 28);
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Monitor: every triple must be consistent; count votes per key.
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      n_votes++;
      for (int i = 0; i < N_PE; i++) chk(out_res[i] == tag(out_key, i), "aligned lane");
      if (voted.exists(out_key)) voted[out_key]++; else voted[out_key] = 1;
    end
    for (int i = 0; i < N_PE; i++) begin
      if (drop[i]) n_drops++;
      if (in_valid[i] && !in_ready[i]) n_stalls++;
    end
  end

  // Send a list of keys on stream `pe`, with random idle cycles.
  task automatic send(input int pe, input key_t keys[$], input int gap);
    foreach (keys[n]) begin
      repeat ($urandom_range(gap, 0)) @(negedge clk);
      @(negedge clk);
      in_valid[pe] = 1; in_key[pe] = keys[n]; in_res[pe] = tag(keys[n], pe);
      do @(posedge clk); while (!in_ready[pe]);
      @(negedge clk);
      in_valid[pe] = 0;
    end
  endtask

  initial begin
    key_t q [$];
    key_t q0 [$], q1 [$], q2 [$];
    int t0;
    for (int i = 0; i < N_PE; i++) begin in_valid[i] = 0; in_key[i] = '0; in_res[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Phase 1: latency.
    q = '{key_t'(32'h1234_5678)};
    fork send(0, q, 0); send(1, q, 0); join
    repeat (3) @(negedge clk);
    chk(n_votes == 0, "no vote on two copies");
    @(negedge clk);
    in_valid[2] = 1; in_key[2] = q[0]; in_res[2] = tag(q[0], 2);
    @(posedge clk); // accepted
    #1 in_valid[2] = 0;
    chk(out_valid == 0, "not yet");
    @(posedge clk); #1 chk(out_valid == 1 && out_key == q[0], "vote one edge after acceptance");
    @(posedge clk); #1 chk(out_valid == 0, "single-cycle vote pulse");
    repeat (3) @(negedge clk);
    // Phase 2: common keys with skew.
    q = {};
    for (int n = 0; n < 300; n++) q.push_back(key_t'({16'(n + 1), 16'($urandom)}));
    fork send(0, q, 2); send(1, q, 2); send(2, q, 2); join
    repeat (10) @(negedge clk);
    foreach (q[n]) chk(voted.exists(q[n]) && voted[q[n]] == 1, "common key voted once");
    chk(n_drops == 0, "no drops with small skew");
    // Phase 3: partial overlap and a lagging stream.
    q0 = {}; q1 = {}; q2 = {};
    for (int n = 0; n < 40; n++) begin
      key_t k;
      k = key_t'({16'hA000 + 16'(n), 16'($urandom)});
      q0.push_back(k); q1.push_back(k);
      if (n % 4 != 0) q2.push_back(k);       // every fourth key skips PE2
    end
    fork
      send(0, q0, 0); send(1, q1, 0);
      begin repeat (3 * DEPTH * 4) @(negedge clk); send(2, q2, 0); end
    join
    repeat (10) @(negedge clk);
    foreach (q0[n]) if (n % 4 == 0) chk(!voted.exists(q0[n]), "partial key not voted");
    chk(n_drops > 0, "drops with a lagging stream");
    chk(n_stalls > 0, "stalls seen");
    $display("votes=%0d drops=%0d stalls=%0d", n_votes, n_drops, n_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
