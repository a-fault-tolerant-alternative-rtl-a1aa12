// tdv_voter: vote execution of time distributed voting (TDV).
//
// Compares the three results that the PEs produced for one input pattern
// and classifies the outcome as in the TDV weight table:
//   all equal (X X X)           -> no weight change
//   one differs (minority PE)   -> minority PE -1, the two majority PEs +1
//   all different (X Y Z)       -> indeterminate, no weight change
// The voter has no notion of the correct answer; it only counts agreement.
// It also returns the majority result when there is one.
//
// Interface: res[i] is PE i's result; outcome, delta[i] (signed -1/0/+1)
// and maj_res/maj_valid are valid whenever the inputs are.
// Timing: purely combinational.
module tdv_voter
  import tdv_pkg::*;
(
  input  res_t               res [N_PE],
  output vote_outcome_e      outcome,
  output logic signed [1:0]  delta [N_PE],
  output res_t               maj_res,
  output logic               maj_valid
);
  logic eq01, eq02, eq12;

  always_comb begin
    eq01 = (res[0] == res[1]);
    eq02 = (res[0] == res[2]);
    eq12 = (res[1] == res[2]);

    if (eq01 && eq02)      outcome = VOTE_ALL_AGREE;
    else if (eq12)         outcome = VOTE_MINORITY_0;
    else if (eq02)         outcome = VOTE_MINORITY_1;
    else if (eq01)         outcome = VOTE_MINORITY_2;
    else                   outcome = VOTE_NO_MAJORITY;

    for (int i = 0; i < N_PE; i++) delta[i] = 2'sd0;
    unique case (outcome)
      VOTE_MINORITY_0: begin delta[0] = -2'sd1; delta[1] = 2'sd1;  delta[2] = 2'sd1;  end
      VOTE_MINORITY_1: begin delta[0] = 2'sd1;  delta[1] = -2'sd1; delta[2] = 2'sd1;  end
      VOTE_MINORITY_2: begin delta[0] = 2'sd1;  delta[1] = 2'sd1;  delta[2] = -2'sd1; end
      default: ;
    endcase

    maj_valid = (outcome != VOTE_NO_MAJORITY);
    maj_res   = (eq01 || eq02) ? res[0] : res[1];
  end
endmodule
