// tdv_weights: accumulated TDV weights and identification of the healthy PE.
//
// Holds one signed weight per PE. On every vote (upd) each weight adds its
// delta from the voter (-1, 0 or +1). Over many input patterns the healthy
// ("golden") PE collects the highest weight, because a faulty PE is usually
// the minority when its fault is activated, while two faulty PEs rarely
// agree on the same wrong result (aliasing). The PE with the highest weight
// is reported as golden (the lowest-numbered one if several share it);
// golden_valid is 0 only while all three weights are equal, i.e. while the
// votes have not yet told the PEs apart.
// Weights saturate at the ends of their WEIGHT_W-bit range.
//
// Interface: clear resets the weights to zero (as does rst_n, synchronous,
// active low). Timing: weights change on the clock edge after upd; golden_*
// follow the registered weights combinationally.
// The update rule is the TDV table; the weight width (16 bits, enough for
// tens of thousands of votes), saturation and tie handling are this design's
// own choices.
module tdv_weights
  import tdv_pkg::*;
#(
  parameter int unsigned WEIGHT_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       upd,
  input  logic signed [1:0]          delta [N_PE],
  output logic signed [WEIGHT_W-1:0] weight [N_PE],
  output pe_id_t                     golden_id,
  output logic                       golden_valid
);
  typedef logic signed [WEIGHT_W-1:0] w_t;
  localparam w_t W_MAX = w_t'({1'b0, {(WEIGHT_W-1){1'b1}}});
  localparam w_t W_MIN = w_t'({1'b1, {(WEIGHT_W-1){1'b0}}});

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < N_PE; i++) weight[i] <= '0;
    end else if (upd) begin
      for (int i = 0; i < N_PE; i++) begin
        if (delta[i] > 0 && weight[i] != W_MAX)      weight[i] <= weight[i] + w_t'(1);
        else if (delta[i] < 0 && weight[i] != W_MIN) weight[i] <= weight[i] - w_t'(1);
      end
    end
  end

  // Largest weight wins, ties to the lowest PE number.
  always_comb begin
    if (weight[0] >= weight[1] && weight[0] >= weight[2]) golden_id = 2'd0;
    else if (weight[1] >= weight[2])                       golden_id = 2'd1;
    else                                                   golden_id = 2'd2;
    golden_valid = !(weight[0] == weight[1] && weight[1] == weight[2]);
  end
endmodule
