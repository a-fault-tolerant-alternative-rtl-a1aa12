// tdv_weights_tb: random weight updates against integer reference weights,
// golden-PE identification (highest weight, lowest index on a tie, not
// valid while all weights are equal), saturation at both ends (WEIGHT_W
// overridden to 4 bits so the limits are reached quickly) and clear.
module tdv_weights_tb;
  import tdv_pkg::*;
  localparam int unsigned WEIGHT_W = 4;

  logic clk = 0, rst_n = 0, clear = 0, upd = 0;
  logic signed [1:0]          delta [N_PE];
  logic signed [WEIGHT_W-1:0] weight [N_PE];
  pe_id_t golden_id;
  logic   golden_valid;
  int checks = 0, failures = 0, n_sat = 0, n_tie = 0;
  int m [N_PE];

  tdv_weights #(.WEIGHT_W(WEIGHT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: w=%0d %0d %0d m=%0d %0d %0d", what, $time,
               weight[0], weight[1], weight[2], m[0], m[1], m[2]);
    end
  endtask

  task automatic compare();
    int best, bi;
    logic all_eq;
    best = -1000; bi = 0;
    for (int i = 0; i < N_PE; i++) begin
      chk(int'(weight[i]) == m[i], "weight");
      if (m[i] > best) begin best = m[i]; bi = i; end
    end
    all_eq = (m[0] == m[1]) && (m[1] == m[2]);
    chk(golden_valid == !all_eq, "golden_valid");
    chk(int'(golden_id) == bi, "golden_id (lowest index on a tie)");
    if (all_eq) n_tie++;
  endtask

  initial begin
    for (int i = 0; i < N_PE; i++) begin m[i] = 0; delta[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 3000; n++) begin
      upd = 1'($urandom_range(3, 0) != 0);
      // Bias the walk so both saturation limits are reached.
      for (int i = 0; i < N_PE; i++)
        delta[i] = (n % 600 < 300) ? 2'($signed($urandom_range(2, 0)) - 1 + ((n % 2 != 0) ? 1 : 0))
                                   : 2'($signed($urandom_range(2, 0)) - 1 - ((n % 2 != 0) ? 1 : 0));
      for (int i = 0; i < N_PE; i++) if (delta[i] == -2) delta[i] = -1;
      clear = (n % 997 == 996);
      @(negedge clk);
      for (int i = 0; i < N_PE; i++) begin
        if (clear) m[i] = 0;
        else if (upd) begin
          int nv;
          nv = m[i] + int'(delta[i]);
          if (nv > 7 || nv < -8) n_sat++;
          else m[i] = nv;
        end
      end
      compare();
    end
    chk(n_sat > 0, "saturation reached");
    chk(n_tie > 0, "ties seen");
    $display("saturations=%0d ties=%0d", n_sat, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
