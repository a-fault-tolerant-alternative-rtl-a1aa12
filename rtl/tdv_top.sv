// tdv_top: time distributed voting (TDV) system with three C6288 PEs.
//
// TDV is an alternative to lockstep triple modular redundancy (TMR). Lockstep
// TMR votes on every cycle and trusts the majority, which fails when two PEs
// are faulty and agree on a wrong result. TDV instead accumulates vote
// outcomes over time: each PE has a weight that drops when the PE is the
// minority of a vote and rises when it is in the majority. Because different
// faults are rarely activated together with the same wrong output, the
// healthy PE ends up with the highest weight even when both other PEs are
// faulty, and is reported as golden.
//
// Datapath: PE i (c6288_pe, a 16x16 array multiplier) multiplies its own
// stream in_a[i] * in_b[i]. The streams are independent; tdv_align uses one
// CAM FIFO per PE to find input patterns that all three PEs have computed
// and aligns their results; tdv_voter classifies each aligned triple and
// tdv_weights accumulates the weight changes.
//
// Interface:
//   in_valid/in_ready/in_a/in_b  one operand stream per PE (valid/ready)
//   fault[i]                     stuck-at fault injected into PE i
//   clear_weights                zero the weights (start a new evaluation)
//   vote_*                       one registered pulse per vote: the pattern,
//                                outcome, and the system result (majority
//                                result, else the current golden PE's result;
//                                vote_result_ok = 0 if neither exists)
//   weight, golden_id/valid      accumulated weights and the identified PE
//   drop, cam_count              CAM FIFO overflow pulses and occupancy
// Timing: a pattern accepted from the last of the three streams at edge t
// gives vote_valid after edge t+2 at the earliest (holding register, CAM
// match, vote register); weights change at the same edge as vote_valid rises.
// The result on a vote with no majority is this design's own choice.
module tdv_top
  import tdv_pkg::*;
#(
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned WEIGHT_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid  [N_PE],
  output logic                       in_ready  [N_PE],
  input  op_t                        in_a      [N_PE],
  input  op_t                        in_b      [N_PE],
  input  fault_t                     fault     [N_PE],
  input  logic                       clear_weights,
  output logic                       vote_valid,
  output key_t                       vote_key,
  output vote_outcome_e              vote_outcome,
  output res_t                       vote_result,
  output logic                       vote_result_ok,
  output logic signed [WEIGHT_W-1:0] weight    [N_PE],
  output pe_id_t                     golden_id,
  output logic                       golden_valid,
  output logic                       drop      [N_PE],
  output logic [$clog2(DEPTH+1)-1:0] cam_count [N_PE]
);
  key_t pe_key [N_PE];
  res_t pe_res [N_PE];

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    c6288_pe u_pe (
      .a    (in_a[i]),
      .b    (in_b[i]),
      .fault(fault[i]),
      .p    (pe_res[i])
    );
    assign pe_key[i] = make_key(in_a[i], in_b[i]);
  end

  logic al_valid;
  key_t al_key;
  res_t al_res [N_PE];

  tdv_align #(.DEPTH(DEPTH)) u_align (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_key   (pe_key),
    .in_res   (pe_res),
    .out_valid(al_valid),
    .out_key  (al_key),
    .out_res  (al_res),
    .drop     (drop),
    .cam_count(cam_count)
  );

  vote_outcome_e     outcome;
  logic signed [1:0] delta [N_PE];
  res_t              maj_res;
  logic              maj_valid;

  tdv_voter u_voter (
    .res      (al_res),
    .outcome  (outcome),
    .delta    (delta),
    .maj_res  (maj_res),
    .maj_valid(maj_valid)
  );

  tdv_weights #(.WEIGHT_W(WEIGHT_W)) u_weights (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (clear_weights),
    .upd         (al_valid),
    .delta       (delta),
    .weight      (weight),
    .golden_id   (golden_id),
    .golden_valid(golden_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) vote_valid <= 1'b0;
    else        vote_valid <= al_valid;
    if (al_valid) begin
      vote_key       <= al_key;
      vote_outcome   <= outcome;
      vote_result    <= maj_valid ? maj_res : al_res[golden_id];
      vote_result_ok <= maj_valid || golden_valid;
    end
  end

endmodule
