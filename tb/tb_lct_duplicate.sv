// tb_lct_duplicate: checks how the LCT pair is completed.
//
// For random ALCT/CLCT pairs with random valid flags the expected outputs
// are worked out case by case: a lone ALCT is copied into the second LCT
// when there are two CLCTs, a lone CLCT is copied when there are two
// ALCTs, and with no ALCT the first ALCT becomes an empty word carrying
// the CLCT's bunch-crossing number.  The four valid-flag combinations that
// trigger duplication are each counted and must all occur.
module tb_lct_duplicate;
  import tmb_pkg::*;
  alct_t alct0_in, alct1_in, alct0, alct1;
  clct_t clct0_in, clct1_in, clct0, clct1;
  logic first_vpf, second_vpf;
  int checks = 0, failures = 0;
  int n_dup_alct = 0, n_dup_clct = 0, n_dummy = 0;

  lct_duplicate dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      alct_t ea0, ea1;
      clct_t ec0, ec1;
      alct0_in = alct_t'($urandom);  alct1_in = alct_t'($urandom);
      clct0_in = clct_t'($urandom);  clct1_in = clct_t'($urandom);
      // a second muon only exists with a first one
      if (!alct0_in.vpf) alct1_in.vpf = 1'b0;
      if (!clct0_in.vpf) clct1_in.vpf = 1'b0;
      ea0 = alct0_in; ea1 = alct1_in; ec0 = clct0_in; ec1 = clct1_in;
      if (!alct0_in.vpf) begin
        ea0 = '0;
        ea0.bxn = clct0_in.bxn;
        n_dummy++;
      end
      if (alct0_in.vpf && !alct1_in.vpf && clct0_in.vpf && clct1_in.vpf) begin
        ea1 = alct0_in; n_dup_alct++;
      end
      if (clct0_in.vpf && !clct1_in.vpf && alct0_in.vpf && alct1_in.vpf) begin
        ec1 = clct0_in; n_dup_clct++;
      end
      #1;
      checks++;
      if (alct0 !== ea0 || alct1 !== ea1 || clct0 !== ec0 || clct1 !== ec1) begin
        failures++;
        $display("FAIL case a0=%b a1=%b c0=%b c1=%b", alct0_in.vpf, alct1_in.vpf,
                 clct0_in.vpf, clct1_in.vpf);
      end
      checks++;
      if (first_vpf !== (alct0_in.vpf | clct0_in.vpf) ||
          second_vpf !== (alct1_in.vpf | clct1_in.vpf)) begin
        failures++;
        $display("FAIL vpf");
      end
    end
    checks++;
    if (n_dup_alct == 0 || n_dup_clct == 0 || n_dummy == 0) begin
      failures++;
      $display("FAIL a duplication case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
