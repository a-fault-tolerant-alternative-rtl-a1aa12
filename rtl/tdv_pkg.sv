// tdv_pkg: types and constants shared by the time distributed voting (TDV)
// system. Three redundant processing elements (PEs), each a 16x16 array
// multiplier, produce 32-bit results. A result is identified by its input
// pattern (the two 16-bit operands), which is the key used to find the same
// pattern in the other PEs' streams. The vote outcome encoding and the
// stuck-at fault injection bundle are this design's own choices.
package tdv_pkg;

  localparam int unsigned N_PE  = 3;   // three redundant PEs
  localparam int unsigned OP_W  = 16;  // operand width of the C6288 multiplier
  localparam int unsigned RES_W = 32;  // product width
  localparam int unsigned KEY_W = 2 * OP_W;

  // Fault sites of one PE: 256 partial products, then the sum and carry
  // outputs of the 240 adder cells (site = 256 + 2*cell + {0:sum, 1:carry}).
  localparam int unsigned N_PP_SITES   = OP_W * OP_W;
  localparam int unsigned N_CELLS      = (OP_W - 1) * OP_W;
  localparam int unsigned N_FAULT_SITES = N_PP_SITES + 2 * N_CELLS;
  localparam int unsigned SITE_W       = $clog2(N_FAULT_SITES);

  typedef logic [OP_W-1:0]  op_t;
  typedef logic [RES_W-1:0] res_t;
  typedef logic [KEY_W-1:0] key_t;
  typedef logic [1:0]       pe_id_t;

  // Stuck-at fault injected into one PE.
  typedef struct packed {
    logic              en;     // fault present
    logic [SITE_W-1:0] site;   // which net is stuck
    logic              value;  // 0: stuck-at-0, 1: stuck-at-1
  } fault_t;

  // One PE result as stored in a CAM FIFO.
  typedef struct packed {
    key_t key;
    res_t res;
  } entry_t;

  // Outcome of one vote over three aligned results (rows of the TDV table).
  typedef enum logic [2:0] {
    VOTE_ALL_AGREE  = 3'd0,  // X X X : no weight change
    VOTE_MINORITY_0 = 3'd1,  // Y X X : PE0 -1, PE1 and PE2 +1
    VOTE_MINORITY_1 = 3'd2,  // X Y X : PE1 -1, PE0 and PE2 +1
    VOTE_MINORITY_2 = 3'd3,  // X X Y : PE2 -1, PE0 and PE1 +1
    VOTE_NO_MAJORITY = 3'd4  // X Y Z : indeterminate, no weight change
  } vote_outcome_e;

  function automatic key_t make_key(op_t a, op_t b);
    return {a, b};
  endfunction

endpackage
