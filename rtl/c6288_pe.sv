// c6288_pe: TDV processing element, a 16x16 unsigned array multiplier with
// the structure of the ISCAS-85 C6288 benchmark.
//
// How it works: 256 AND gates form the partial products pp[j][i] = a[i]&b[j]
// (weight 2^(i+j)). They are summed by 240 adder cells arranged as 16 rows of
// 15 (the benchmark's 15-by-16 array):
//   * row 1: 15 half adders adding pp[0] (shifted) and pp[1]; having no row
//     above, they lack the carry input;
//   * rows 2..15: 15 full adders each, carry-save: every cell adds pp[r][i],
//     the sum of the cell up and to the left and the carry of the cell above;
//   * bottom row: a 15-cell ripple-carry adder that merges the remaining sums
//     and carries into product bits 16..31. Its first cell is a half adder
//     (no B input: there is no ripple carry into it).
// Product bit r (r < 16) leaves the array at the right edge of row r.
//
// Fault injection (this design's own addition, for exercising the voter):
// the port `fault` forces one net to a constant, modelling a single
// stuck-at-0 or stuck-at-1 fault. Sites are numbered as in tdv_pkg:
// 0..255 the partial products (site j*16+i), then 256 + 2*cell + {0 sum,
// 1 carry}, with cell = (row-1)*15 + column for rows 1..15 and 225 + k for
// the ripple cell k. The benchmark itself is a NOR-gate netlist with 2448
// fault nodes; this model offers the 736 word-level nets of the same array.
//
// Interface: operands a and b, product p = a*b when fault.en is 0.
// Timing: purely combinational.
module c6288_pe
  import tdv_pkg::*;
(
  input  op_t    a,
  input  op_t    b,
  input  fault_t fault,
  output res_t   p
);
  localparam int unsigned W    = OP_W;      // 16
  localparam int unsigned COLS = OP_W - 1;  // 15 cells per row

  // Force a net to the stuck value when it is the selected fault site.
  function automatic logic inj(input logic v, input int unsigned site);
    return (fault.en && (int'(fault.site) == site)) ? fault.value : v;
  endfunction

  // Partial products after fault injection.
  wire [W-1:0] pp [W];
  // Carry-save rows 1..15 (index 0 unused): raw cell outputs and faulted ones.
  wire [COLS-1:0] s_raw [W];
  wire [COLS-1:0] c_raw [W];
  wire [COLS-1:0] s_f   [W];
  wire [COLS-1:0] c_f   [W];
  // Bottom ripple row.
  wire [COLS-1:0] rs_raw, rc_raw, rs_f, rc_f;

  for (genvar j = 0; j < W; j++) begin : g_pp_row
    for (genvar i = 0; i < W; i++) begin : g_pp
      assign pp[j][i] = inj(a[i] & b[j], j * W + i);
    end
  end

  for (genvar r = 1; r < W; r++) begin : g_row
    for (genvar i = 0; i < COLS; i++) begin : g_cell
      localparam int unsigned CELL = (r - 1) * COLS + i;
      if (r == 1) begin : g_top
        // Top row: half adders, no carry from above.
        c6288_ha u_ha (
          .a (pp[0][i+1]),
          .b (pp[1][i]),
          .s (s_raw[r][i]),
          .co(c_raw[r][i])
        );
      end else begin : g_mid
        // Sum from the cell up-left, or the leftover partial product of the
        // row above at the left edge of the array.
        wire s_in = (i == COLS - 1) ? pp[r-1][W-1] : s_f[r-1][i+1];
        c6288_fa u_fa (
          .a (s_in),
          .b (pp[r][i]),
          .ci(c_f[r-1][i]),
          .s (s_raw[r][i]),
          .co(c_raw[r][i])
        );
      end
      assign s_f[r][i] = inj(s_raw[r][i], N_PP_SITES + 2 * CELL);
      assign c_f[r][i] = inj(c_raw[r][i], N_PP_SITES + 2 * CELL + 1);
    end
  end

  for (genvar k = 0; k < COLS; k++) begin : g_ripple
    localparam int unsigned CELL = (W - 1) * COLS + k;
    wire a_in = (k == COLS - 1) ? pp[W-1][W-1] : s_f[W-1][k+1];
    if (k == 0) begin : g_first
      c6288_ha u_ha (
        .a (a_in),
        .b (c_f[W-1][k]),
        .s (rs_raw[k]),
        .co(rc_raw[k])
      );
    end else begin : g_rest
      c6288_fa u_fa (
        .a (a_in),
        .b (c_f[W-1][k]),
        .ci(rc_f[k-1]),
        .s (rs_raw[k]),
        .co(rc_raw[k])
      );
    end
    assign rs_f[k] = inj(rs_raw[k], N_PP_SITES + 2 * CELL);
    assign rc_f[k] = inj(rc_raw[k], N_PP_SITES + 2 * CELL + 1);
  end

  always_comb begin
    p[0] = pp[0][0];
    for (int r = 1; r < W; r++) p[r] = s_f[r][0];
    for (int k = 0; k < COLS; k++) p[W+k] = rs_f[k];
    p[RES_W-1] = rc_f[COLS-1];
  end

endmodule
