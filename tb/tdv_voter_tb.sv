// tdv_voter_tb: drives every row of the TDV weight table (all agree, each PE
// as the minority, all different) with random values and checks outcome,
// weight deltas and majority result against the table.
module tdv_voter_tb;
  import tdv_pkg::*;

  res_t              res [N_PE];
  vote_outcome_e     outcome;
  logic signed [1:0] delta [N_PE];
  res_t              maj_res;
  logic              maj_valid;
  int checks = 0, failures = 0;

  tdv_voter dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: %h %h %h outcome=%0d", what, res[0], res[1], res[2], outcome);
    end
  endtask

  initial begin
    for (int n = 0; n < 1000; n++) begin
      res_t x, y, z;
      int row;
      int signed ed [N_PE];
      vote_outcome_e eo;
      x = res_t'($urandom);
      y = x ^ res_t'(1 << $urandom_range(31, 0));          // differs from x
      z = y ^ (x ^ y) ^ res_t'(3 << $urandom_range(30, 0)); // differs from x and y
      row = n % 5;
      case (row)
        0: begin res[0] = x; res[1] = x; res[2] = x; eo = VOTE_ALL_AGREE;   ed = '{0, 0, 0};   end
        1: begin res[0] = y; res[1] = x; res[2] = x; eo = VOTE_MINORITY_0;  ed = '{-1, 1, 1};  end
        2: begin res[0] = x; res[1] = y; res[2] = x; eo = VOTE_MINORITY_1;  ed = '{1, -1, 1};  end
        3: begin res[0] = x; res[1] = x; res[2] = y; eo = VOTE_MINORITY_2;  ed = '{1, 1, -1};  end
        default: begin res[0] = x; res[1] = y; res[2] = z; eo = VOTE_NO_MAJORITY; ed = '{0, 0, 0}; end
      endcase
      #1;
      chk(outcome == eo, "outcome");
      for (int i = 0; i < N_PE; i++) chk(int'(delta[i]) == ed[i], "delta");
      chk(maj_valid == (row != 4), "maj_valid");
      if (row != 4) chk(maj_res == x, "maj_res");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
