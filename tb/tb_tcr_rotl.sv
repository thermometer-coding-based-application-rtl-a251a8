// tb_tcr_rotl: self-checking test of the thermometer-controlled left rotator.
//
// Two instances, W = 6 (the 6-bit words of a modulo-7 adder) and W = 12, are
// driven with every amount 0 .. W in thermometer code. The W = 6 instance sees
// every possible data word, the W = 12 one 500 random words per amount. The
// expected word is built bit by bit: bit i of the input goes to bit (i+k) mod W.
// The rotator is combinational, so each output is checked 1 time unit after
// its inputs change. A watchdog ends the run with a failure if it hangs.
module tb_tcr_rotl;

  int checks   = 0;
  int failures = 0;

  logic [5:0]  din6,  amt6,  dout6;
  logic [11:0] din12, amt12, dout12;

  tcr_rotl #(.W(6))  dut6  (.din(din6),  .amt(amt6),  .dout(dout6));
  tcr_rotl #(.W(12)) dut12 (.din(din12), .amt(amt12), .dout(dout12));

  function automatic logic [11:0] ref_rotl(input logic [11:0] d, input int w, input int k);
    logic [11:0] r = '0;
    for (int i = 0; i < w; i++) r[(i + k) % w] = d[i];
    return r;
  endfunction

  function automatic logic [11:0] therm(input int k);
    logic [11:0] t = '0;
    for (int i = 0; i < k; i++) t[i] = 1'b1;
    return t;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] exp_w;
    for (int k = 0; k <= 6; k++) begin
      for (int d = 0; d < 64; d++) begin
        din6 = 6'(d);
        amt6 = 6'(therm(k));
        #1;
        exp_w = ref_rotl(12'(d), 6, k);
        checks++;
        if (dout6 !== exp_w[5:0]) begin
          failures++;
          $display("W=6 din=%b k=%0d: got %b expected %b", din6, k, dout6, exp_w[5:0]);
        end
      end
    end
    for (int k = 0; k <= 12; k++) begin
      for (int n = 0; n < 500; n++) begin
        din12 = 12'($urandom);
        amt12 = therm(k);
        #1;
        exp_w = ref_rotl(din12, 12, k);
        checks++;
        if (dout12 !== exp_w) begin
          failures++;
          $display("W=12 din=%b k=%0d: got %b expected %b", din12, k, dout12, exp_w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
