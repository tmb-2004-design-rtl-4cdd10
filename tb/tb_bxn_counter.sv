// tb_bxn_counter: checks the bunch-crossing counter.
//
// The counter must count 0 .. lhc_cycle-1 and wrap, load bxn_offset on a
// bunch-counter reset, raise bx0_local whenever it reads 0, and set a
// sticky sync error when a TTC BX0 arrives while it does not read 0; the
// error is cleared by resync.  The test uses the beam-test cycle of 924
// crossings for one full turn and then random short cycles, comparing with
// a counter kept in the test bench.
module tb_bxn_counter;
  logic clk = 1'b0, rst = 1'b1;
  logic [11:0] lhc_cycle = 12'd924, bxn_offset = '0;
  logic bcnt_reset = 1'b0, ccb_bx0 = 1'b0, resync = 1'b0;
  logic [11:0] bxn;
  logic bx0_local, sync_err;
  int checks = 0, failures = 0;

  bxn_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_bxn;
  bit ref_err;
  int wraps, errs_set;

  task automatic step(input bit do_reset, input bit do_bx0, input bit do_resync);
    @(negedge clk);
    bcnt_reset = do_reset; ccb_bx0 = do_bx0; resync = do_resync;
    // reference for the coming edge
    if (do_resync) ref_err = 1'b0;
    else if (do_bx0 && ref_bxn != 0 && !do_reset) begin ref_err = 1'b1; errs_set++; end
    if (do_reset) ref_bxn = int'(bxn_offset);
    else if (ref_bxn + 1 >= int'(lhc_cycle)) begin ref_bxn = 0; wraps++; end
    else ref_bxn = ref_bxn + 1;
    @(posedge clk); #1;
    checks++;
    if (int'(bxn) != ref_bxn || bx0_local != (ref_bxn == 0) || sync_err != ref_err) begin
      failures++;
      $display("FAIL bxn=%0d exp=%0d bx0=%b err=%b exp_err=%b", bxn, ref_bxn, bx0_local,
               sync_err, ref_err);
    end
  endtask

  initial begin
    ref_bxn = 0; ref_err = 0;
    repeat (3) @(posedge clk);
    @(posedge clk); #1 rst = 1'b0;
    // one full beam-test turn with a BX0 at every wrap: no error expected
    for (int i = 0; i < 2000; i++) step(1'b0, ref_bxn == 0, 1'b0);
    checks++;
    if (wraps < 2 || sync_err) begin failures++; $display("FAIL wrap/sync"); end
    // random short cycles, offsets, BX0s and resyncs
    for (int r = 0; r < 20; r++) begin
      @(negedge clk);
      lhc_cycle  = 12'(8 + $urandom % 40);
      bxn_offset = 12'($urandom % 8);
      step(1'b1, 1'b0, 1'b0);
      for (int i = 0; i < 200; i++)
        step(1'b0, ($urandom % 17) == 0, ($urandom % 31) == 0);
    end
    checks++;
    if (errs_set == 0) begin failures++; $display("FAIL no sync error exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
