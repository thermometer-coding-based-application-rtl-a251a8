// tb_tcr_case_detect: self-checking test of the outcome classifier.
//
// The classifier (W = 6) is driven with every pair of 6-bit OR and XOR words,
// valid or not, and its outcome is compared with one computed from bit counts:
// a zero in the OR word gives SUM_LT_M1, otherwise the number of zeros in the
// XOR word (0, 1, or more) gives SUM_EQ_M1, SUM_EQ_M or SUM_GT_M. Each outcome
// must be seen at least once. Combinational: checked 1 time unit after each
// input change. A watchdog ends the run with a failure if it hangs.
module tb_tcr_case_detect;
  import tcr_pkg::*;

  int checks   = 0;
  int failures = 0;
  int seen [4] = '{default: 0};

  logic [5:0] or_v, xor_v;
  tcr_case_e  sum_case;
  tcr_case_e  exp_case;

  tcr_case_detect #(.W(6)) dut (.or_v(or_v), .xor_v(xor_v), .sum_case(sum_case));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int zeros;
    for (int o = 0; o < 64; o++) begin
      for (int x = 0; x < 64; x++) begin
        or_v  = 6'(o);
        xor_v = 6'(x);
        #1;
        zeros = 6 - $countones(xor_v);
        if (or_v != 6'h3f)  exp_case = SUM_LT_M1;
        else if (zeros == 0) exp_case = SUM_EQ_M1;
        else if (zeros == 1) exp_case = SUM_EQ_M;
        else                 exp_case = SUM_GT_M;
        checks++;
        seen[int'(exp_case)]++;
        if (sum_case !== exp_case) begin
          failures++;
          $display("or=%b xor=%b: got %0d expected %0d", or_v, xor_v, sum_case, exp_case);
        end
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) begin
        failures++;
        $display("outcome %0d never exercised", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
