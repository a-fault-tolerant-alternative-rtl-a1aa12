// cam_fifo: content-addressable FIFO holding one PE's recent results.
//
// Each entry is an (input pattern, result) pair. Entries are written in
// arrival order into a ring of DEPTH slots; the slot written next is always
// the oldest one, so a result stays searchable for at most DEPTH later
// writes of the same PE. Writing over a slot that is still valid discards
// that entry and pulses `drop` (its voting opportunity is lost).
// All slots are compared with `search_key` at once (the CAM search). When
// several slots match, the oldest one is reported. A matched entry is
// removed with `inv_en`/`inv_idx` once it has taken part in a vote, which
// leaves a hole that is reused when the write pointer comes round.
//
// Timing: the search is combinational on the current contents; a write or
// an invalidation takes effect at the next rising clock edge. Reset is
// synchronous, active low, and clears all valid bits.
// The CAM-based FIFO as such comes from the TDV prototype; its depth
// (DEPTH = 8) and oldest-first overwrite are this design's own choices.
module cam_fifo
  import tdv_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write port
  input  logic                     wr_en,
  input  entry_t                   wr_entry,
  output logic                     drop,       // a valid entry was overwritten
  // search port
  input  key_t                     search_key,
  output logic                     hit,
  output logic [$clog2(DEPTH)-1:0] hit_idx,
  output res_t                     hit_res,
  // removal of a matched entry
  input  logic                     inv_en,
  input  logic [$clog2(DEPTH)-1:0] inv_idx,
  // status
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned IW = $clog2(DEPTH);
  typedef logic [IW-1:0] idx_t;

  entry_t           mem   [DEPTH];
  logic [DEPTH-1:0] valid;
  idx_t             wp;

  // Index of the slot `off` places younger than the oldest slot.
  function automatic idx_t age_to_idx(idx_t base, int unsigned off);
    int unsigned s;
    s = int'(base) + off;
    if (s >= DEPTH) s -= DEPTH;
    return idx_t'(s);
  endfunction

  // CAM search: oldest matching valid entry.
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int off = DEPTH - 1; off >= 0; off--) begin
      idx_t k;
      k = age_to_idx(wp, off);
      if (valid[k] && mem[k].key == search_key) begin
        hit     = 1'b1;
        hit_idx = k;
      end
    end
    hit_res = mem[hit_idx].res;
  end

  assign drop = wr_en && valid[wp];

  always_comb begin
    count = '0;
    for (int k = 0; k < DEPTH; k++) count += valid[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
      wp    <= '0;
    end else begin
      if (inv_en) valid[inv_idx] <= 1'b0;
      if (wr_en) begin
        valid[wp] <= 1'b1;
        wp        <= age_to_idx(wp, 1);
      end
    end
  end

  // Entry storage has no reset: a slot is only read while its valid bit is set.
  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_entry;
  end

  // Only an entry that is present may be removed.
  assert property (@(posedge clk) disable iff (!rst_n) inv_en |-> valid[inv_idx])
    else $error("cam_fifo: invalidating an empty slot");

endmodule
