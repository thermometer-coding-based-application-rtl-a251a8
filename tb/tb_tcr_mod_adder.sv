// tb_tcr_mod_adder: end-to-end test of the modulo-7 thermometer-code adder.
//
// The adder runs at its default modulus (7, 6-bit operands) with no parameter
// override. The test first applies the four worked additions that define the
// four outcomes (3+2, 4+2, 5+2, 6+2 modulo 7) and checks the exact bit
// patterns, then applies all 49 operand pairs and compares the sum with the
// thermometer code of (u+v) mod 7 and the reported outcome with one derived
// from u+v. Each of the four outcomes (sum < m-1 via rotation, sum = m-1,
// sum = m, sum > m) is counted and must occur at least once. The adder is
// combinational, so the sum must be valid in the same step as its operands:
// every check is made 1 time unit after the operands change. A watchdog ends
// the run with a failure if it hangs.
module tb_tcr_mod_adder;
  import tcr_pkg::*;

  localparam int M = 7;
  localparam int W = M - 1;

  int checks   = 0;
  int failures = 0;
  int seen [4] = '{default: 0};

  logic [W-1:0] u, v, sum;
  tcr_case_e    sum_case;

  tcr_mod_adder dut (.u(u), .v(v), .sum(sum), .sum_case(sum_case));

  function automatic logic [W-1:0] therm(input int k);
    logic [W-1:0] t = '0;
    for (int i = 0; i < k; i++) t[i] = 1'b1;
    return t;
  endfunction

  task automatic apply_and_check(input int a, input int b);
    tcr_case_e exp_case;
    logic [W-1:0] exp_sum;
    u = therm(a);
    v = therm(b);
    #1;
    exp_sum = therm((a + b) % M);
    if (a + b < M - 1)       exp_case = SUM_LT_M1;
    else if (a + b == M - 1) exp_case = SUM_EQ_M1;
    else if (a + b == M)     exp_case = SUM_EQ_M;
    else                     exp_case = SUM_GT_M;
    checks++;
    if (sum !== exp_sum) begin
      failures++;
      $display("%0d + %0d mod %0d: sum %b expected %b", a, b, M, sum, exp_sum);
    end
    checks++;
    if (sum_case !== exp_case) begin
      failures++;
      $display("%0d + %0d mod %0d: outcome %0d expected %0d", a, b, M, sum_case, exp_case);
    end
    seen[int'(sum_case)]++;
  endtask

  task automatic worked(input logic [W-1:0] a, input logic [W-1:0] b, input logic [W-1:0] exp_sum);
    u = a;
    v = b;
    #1;
    checks++;
    if (sum !== exp_sum) begin
      failures++;
      $display("worked example %b + %b: sum %b expected %b", a, b, sum, exp_sum);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // The four worked additions, in 6-bit thermometer code.
    worked(6'b000111, 6'b000011, 6'b011111);  // 3 + 2 = 5
    worked(6'b001111, 6'b000011, 6'b111111);  // 4 + 2 = 6
    worked(6'b011111, 6'b000011, 6'b000000);  // 5 + 2 = 7 -> 0
    worked(6'b111111, 6'b000011, 6'b000001);  // 6 + 2 = 8 -> 1

    for (int a = 0; a < M; a++)
      for (int b = 0; b < M; b++)
        apply_and_check(a, b);

    $display("outcomes: sum<m-1 %0d, sum=m-1 %0d, sum=m %0d, sum>m %0d",
             seen[0], seen[1], seen[2], seen[3]);
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
