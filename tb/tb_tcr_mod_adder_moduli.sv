// tb_tcr_mod_adder_moduli: the adder at every modulus of the published
// comparison (7, 8, 9, 11 and 13), each checked over all operand pairs by a
// tcr_mod_adder_checker. Ends with the summed totals; a watchdog ends the run
// with a failure if any checker hangs.
module tb_tcr_mod_adder_moduli;

  localparam int NM = 5;
  localparam int unsigned MODS [NM] = '{7, 8, 9, 11, 13};

  logic [NM-1:0] done;
  int c [NM];
  int f [NM];

  for (genvar g = 0; g < NM; g++) begin : g_mod
    tcr_mod_adder_checker #(.MOD(MODS[g])) chk (.done(done[g]), .checks(c[g]), .failures(f[g]));
  end

  initial begin
    int checks, failures;
    fork
      begin
        wait (&done);
        #1;
      end
      begin
        #100_000;
        $display("watchdog expired");
      end
    join_any
    checks   = 0;
    failures = (&done) ? 0 : 1;
    for (int i = 0; i < NM; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
