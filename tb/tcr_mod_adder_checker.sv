// tcr_mod_adder_checker: exhaustive checker for one modulus, used by
// tb_tcr_mod_adder_moduli. It instantiates a tcr_mod_adder of modulus MOD,
// applies every operand pair (MOD*MOD additions), compares the sum with the
// thermometer code of (u+v) mod MOD and the outcome with one derived from u+v,
// and counts the four outcomes; a missing outcome counts as a failure. It
// raises done when finished, with its totals on checks and failures.
module tcr_mod_adder_checker
  import tcr_pkg::*;
#(
  parameter int unsigned MOD = 7
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int W = MOD - 1;

  logic [W-1:0] u, v, sum;
  tcr_case_e    sum_case;
  int seen [4];
  int n_checks = 0;
  int n_fail = 0;

  assign checks   = n_checks;
  assign failures = n_fail;

  tcr_mod_adder #(.MOD(MOD)) dut (.u(u), .v(v), .sum(sum), .sum_case(sum_case));

  function automatic logic [W-1:0] therm(input int k);
    logic [W-1:0] t = '0;
    for (int i = 0; i < k; i++) t[i] = 1'b1;
    return t;
  endfunction

  initial begin
    tcr_case_e exp_case;
    done     = 1'b0;
    seen     = '{default: 0};
    for (int a = 0; a < int'(MOD); a++) begin
      for (int b = 0; b < int'(MOD); b++) begin
        u = therm(a);
        v = therm(b);
        #1;
        if (a + b < W)       exp_case = SUM_LT_M1;
        else if (a + b == W) exp_case = SUM_EQ_M1;
        else if (a + b == W + 1) exp_case = SUM_EQ_M;
        else                 exp_case = SUM_GT_M;
        n_checks = n_checks + 2;
        if (sum !== therm((a + b) % int'(MOD))) begin
          n_fail++;
          $display("mod %0d: %0d + %0d gave %b", MOD, a, b, sum);
        end
        if (sum_case !== exp_case) begin
          n_fail++;
          $display("mod %0d: %0d + %0d outcome %0d expected %0d", MOD, a, b, sum_case, exp_case);
        end
        seen[int'(sum_case)]++;
      end
    end
    for (int k = 0; k < 4; k++) begin
      n_checks = n_checks + 1;
      if (seen[k] == 0) begin
        n_fail++;
        $display("mod %0d: outcome %0d never exercised", MOD, k);
      end
    end
    $display("mod %0d: %0d additions, outcomes %0d/%0d/%0d/%0d", MOD, MOD * MOD,
             seen[0], seen[1], seen[2], seen[3]);
    done = 1'b1;
  end

endmodule
