// tdv_align: voting-opportunity detection and result alignment for TDV.
//
// The three PEs work on independent data streams, so the same input pattern
// reaches them at different times, or not at all. This block finds the
// patterns that all three PEs have computed and lines their results up for
// a vote:
//   1. Each PE result (pattern key + result) is caught in a one-entry holding
//      register (in_valid/in_ready handshake per PE).
//   2. A round-robin arbiter takes one held result per cycle and searches all
//      three CAM FIFOs for its key in the same cycle.
//   3. If both other PEs' CAMs hold that key, the three results are aligned
//      (out_res[i] belongs to PE i), sent out for a vote, and the two matched
//      CAM entries are removed. Otherwise the result is written into its own
//      PE's CAM to wait for the other two.
// A PE whose holding register is full and not granted sees in_ready low
// (a stall). cam_count[i] is the number of results waiting in PE i's CAM.
// A result that leaves a CAM unmatched after DEPTH newer results
// of the same PE is dropped (drop[i] pulses).
//
// Timing: a result accepted at edge t is processed at edge t+1 at the
// earliest; an aligned triple appears on out_* (registered, one-cycle
// out_valid pulse) after that edge. At most one result is processed, and so
// at most one vote issued, per cycle.
// The CAM-based detection and alignment follow the TDV prototype; the
// holding registers, the round-robin order and one result per cycle are
// this design's own choices. Reset: rst_n, synchronous, active low.
module tdv_align
  import tdv_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  // PE result streams
  input  logic   in_valid [N_PE],
  output logic   in_ready [N_PE],
  input  key_t   in_key   [N_PE],
  input  res_t   in_res   [N_PE],
  // aligned results for the voter
  output logic   out_valid,
  output key_t   out_key,
  output res_t   out_res  [N_PE],
  // status
  output logic   drop     [N_PE],
  output logic [$clog2(DEPTH+1)-1:0] cam_count [N_PE]
);
  localparam int unsigned IW = $clog2(DEPTH);

  // Holding registers.
  logic   hold_v [N_PE];
  entry_t hold_e [N_PE];

  // Round-robin arbiter: rr is the PE with the highest priority.
  pe_id_t rr;
  logic   gnt_v;
  pe_id_t gnt;
  logic   gnt_vec [N_PE];

  always_comb begin
    gnt_v = 1'b0;
    gnt   = '0;
    for (int off = N_PE - 1; off >= 0; off--) begin
      int unsigned k;
      k = int'(rr) + off;
      if (k >= N_PE) k -= N_PE;
      if (hold_v[k]) begin
        gnt_v = 1'b1;
        gnt   = pe_id_t'(k);
      end
    end
    for (int i = 0; i < N_PE; i++) gnt_vec[i] = gnt_v && (gnt == pe_id_t'(i));
  end

  entry_t cur;
  assign cur = hold_e[gnt];

  // CAM FIFOs, one per PE, all searched with the granted key.
  logic          cam_hit  [N_PE];
  logic [IW-1:0] cam_idx  [N_PE];
  res_t          cam_res  [N_PE];
  logic          cam_wr   [N_PE];
  logic          cam_inv  [N_PE];

  for (genvar i = 0; i < N_PE; i++) begin : g_cam
    cam_fifo #(.DEPTH(DEPTH)) u_cam (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_en     (cam_wr[i]),
      .wr_entry  (cur),
      .drop      (drop[i]),
      .search_key(cur.key),
      .hit       (cam_hit[i]),
      .hit_idx   (cam_idx[i]),
      .hit_res   (cam_res[i]),
      .inv_en    (cam_inv[i]),
      .inv_idx   (cam_idx[i]),
      .count     (cam_count[i])
    );
  end

  // A vote opportunity: the two other PEs both hold the granted key.
  logic match;
  always_comb begin
    match = gnt_v;
    for (int i = 0; i < N_PE; i++)
      if (!gnt_vec[i] && !cam_hit[i]) match = 1'b0;
    for (int i = 0; i < N_PE; i++) begin
      cam_wr[i]  = gnt_vec[i] && !match;
      cam_inv[i] = match && !gnt_vec[i];
    end
  end

  for (genvar i = 0; i < N_PE; i++) begin : g_hold
    assign in_ready[i] = !hold_v[i] || gnt_vec[i];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        hold_v[i] <= 1'b0;
      end else if (in_valid[i] && in_ready[i]) begin
        hold_v[i] <= 1'b1;
      end else if (gnt_vec[i]) begin
        hold_v[i] <= 1'b0;
      end
      if (in_valid[i] && in_ready[i]) hold_e[i] <= '{key: in_key[i], res: in_res[i]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= match;
      if (gnt_v) rr <= (gnt == pe_id_t'(N_PE - 1)) ? '0 : gnt + 2'd1;
    end
    if (match) begin
      out_key <= cur.key;
      for (int i = 0; i < N_PE; i++) out_res[i] <= gnt_vec[i] ? cur.res : cam_res[i];
    end
  end

endmodule
