// cam_fifo_tb: random writes, searches and removals against a reference
// model of the CAM FIFO (ring of DEPTH slots, oldest match reported, a write
// over a valid slot drops it). Keys come from a small set so that hits,
// multiple matches and overwrites of unmatched entries all happen; their
// counts must all be non-zero.
module cam_fifo_tb;
  import tdv_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned IW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, inv_en = 0, drop, hit;
  entry_t wr_entry;
  key_t search_key;
  logic [IW-1:0] hit_idx, inv_idx;
  res_t hit_res;
  logic [$clog2(DEPTH+1)-1:0] count;

  cam_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // Reference model.
  logic   m_valid [DEPTH];
  entry_t m_mem   [DEPTH];
  int     m_wp;
  int checks = 0, failures = 0, n_hits = 0, n_multi = 0, n_drops = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    wr_entry = '0; search_key = '0; inv_idx = '0;
    for (int k = 0; k < DEPTH; k++) m_valid[k] = 0;
    m_wp = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      int e_idx, nm, cnt;
      logic e_hit;
      // Drive this cycle's operation.
      @(negedge clk);
      wr_en          = 1'($urandom_range(99, 0) < 60);
      wr_entry.key   = key_t'($urandom_range(11, 0));
      wr_entry.res   = res_t'($urandom);
      search_key     = key_t'($urandom_range(11, 0));
      #1;
      // Expected search result: oldest valid match, scanning from m_wp.
      e_hit = 0; e_idx = 0; nm = 0; cnt = 0;
      for (int off = 0; off < DEPTH; off++) begin
        int k;
        k = (m_wp + off) % DEPTH;
        if (m_valid[k] && m_mem[k].key == search_key) begin
          if (!e_hit) e_idx = k;
          e_hit = 1;
          nm++;
        end
      end
      for (int k = 0; k < DEPTH; k++) cnt += int'(m_valid[k]);
      chk(hit == e_hit, "hit");
      chk(int'(count) == cnt, "count");
      chk(drop == (wr_en && m_valid[m_wp]), "drop");
      if (e_hit) begin
        chk(int'(hit_idx) == e_idx, "hit_idx");
        chk(hit_res == m_mem[e_idx].res, "hit_res");
        n_hits++;
        if (nm > 1) n_multi++;
      end
      if (drop) n_drops++;
      // Remove the match half of the time (never the slot being written).
      inv_en  = e_hit && (e_idx != m_wp || !wr_en) && 1'($urandom);
      inv_idx = IW'(e_idx);
      @(posedge clk);
      if (inv_en) m_valid[e_idx] = 0;
      if (wr_en) begin
        m_valid[m_wp] = 1;
        m_mem[m_wp]   = wr_entry;
        m_wp          = (m_wp + 1) % DEPTH;
      end
    end
    chk(n_hits > 0, "some hits");
    chk(n_multi > 0, "some multiple matches");
    chk(n_drops > 0, "some drops");
    $display("hits=%0d multiple=%0d drops=%0d", n_hits, n_multi, n_drops);
    // Reset clears every entry.
    @(negedge clk); wr_en = 0; inv_en = 0; rst_n = 0;
    @(negedge clk); rst_n = 1; #1;
    chk(count == 0, "count after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
