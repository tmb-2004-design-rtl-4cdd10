// tb_clct_sequencer: checks the cathode LCT finder and its trigger sequence.
//
// Two CFEBs (64 key half-strips) keep the run short.  Each trial puts up to
// two straight tracks on the layers: track A with nA layers at key kA and
// track B with fewer layers at key kB, six or more half-strips away, both
// always including the key layer 3.  A straight track gives pattern 7 with
// as many layers as it has hits, and its neighbours score less, so the
// expected CLCTs follow from the track list alone.  Random settings:
// pre-trigger threshold, pattern-hit minimum, drift delay, flush delay and
// valid_clct_required.  Checked: a pre-trigger exactly when a track reaches
// the threshold; the latch exactly drift_delay clocks after it; the two
// CLCT words (valid flag, layers, pattern, key, CFEB, bxn, bx0, sync
// error); the active-FEB list; the invalid-pattern flag; the return to idle.
module tb_clct_sequencer;
  import tmb_pkg::*;
  localparam int NCF = 2, NK = NCF * 32;
  logic clk = 1'b0, rst = 1'b1;
  logic [NK-1:0] hs [NLAYER];
  logic [2:0] hs_thresh = 3'd4, nph_pattern = 3'd4;
  logic [1:0] drift_delay = 2'd2;
  logic [3:0] flush_delay = 4'd1;
  logic valid_clct_required = 1'b1, all_cfebs_active = 1'b0, trig_en = 1'b1;
  logic [1:0] bxn = '0;
  logic sync_err = 1'b0, bx0_local = 1'b0;
  logic pretrig, clct_latch, invp;
  logic [NCF-1:0] active_feb;
  clct_t clct0, clct1;
  logic [2:0] clct_sm;
  int checks = 0, failures = 0;
  int n_pretrig = 0, n_invp = 0, n_two = 0, n_none = 0;

  clct_sequencer #(.NCF(NCF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // layers of a track: layer 3 plus n-1 of the others
  function automatic logic [5:0] pick_layers(input int n);
    logic [5:0] m;
    m = 6'b001000;
    while ($countones(m) < n) m[$urandom % 6] = 1'b1;
    return m;
  endfunction

  task automatic trial(input int nA, input int nB, input int dd, input int th, input int nph);
    int kA, kB, pre_c, lat_c;
    logic [5:0] lA, lB;
    bit exp_pre;
    logic [NCF-1:0] exp_feb;
    clct_t got0, got1;
    logic got_invp;
    kA = ($urandom % NCF) * 32 + 2 + $urandom % 28;
    do kB = ($urandom % NCF) * 32 + 2 + $urandom % 28;
    while (kB - kA < 6 && kA - kB < 6);
    lA = pick_layers(nA);
    lB = (nB > 0) ? pick_layers(nB) : 6'b0;
    @(negedge clk);
    hs_thresh = 3'(th); nph_pattern = 3'(nph); drift_delay = 2'(dd);
    flush_delay = 4'($urandom % 4);
    valid_clct_required = 1'($urandom);
    bxn = 2'($urandom); sync_err = 1'($urandom); bx0_local = 1'($urandom);
    for (int l = 0; l < NLAYER; l++) begin
      hs[l] = '0;
      if (lA[l]) hs[l][kA] = 1'b1;
      if (lB[l]) hs[l][kB] = 1'b1;
    end
    exp_pre = (nA >= th);
    exp_feb = '0;
    if (nA >= th) exp_feb[kA / 32] = 1'b1;
    if (nB >= th && nB > 0) exp_feb[kB / 32] = 1'b1;
    pre_c = -1; lat_c = -1;
    for (int c = 0; c < 12; c++) begin
      @(posedge clk); #1;
      if (pretrig) begin
        chk(pre_c < 0, "single pretrig");
        pre_c = c;
        chk(active_feb == exp_feb, $sformatf("active feb %b exp %b", active_feb, exp_feb));
      end
      if (clct_latch) begin
        lat_c = c; got0 = clct0; got1 = clct1; got_invp = invp;
      end
      if (c == 5) for (int l = 0; l < NLAYER; l++) hs[l] = '0;   // hits fade
    end
    chk(exp_pre == (pre_c >= 0), $sformatf("pretrig %0d exp %b (nA=%0d th=%0d)", pre_c,
        exp_pre, nA, th));
    if (exp_pre) begin
      n_pretrig++;
      chk(pre_c == 0, "pretrig on the first clock with hits");
      chk(lat_c - pre_c == dd, $sformatf("latch %0d clocks after pretrig, drift %0d",
          lat_c - pre_c, dd));
      chk(got0.vpf == (nA >= nph) && got0.nhit == 3'(nA) && got0.pat == 3'd7 &&
          got0.hsds && got0.bend == 1'b1 && got0.key == 5'(kA % 32) &&
          got0.cfeb == 3'(kA / 32) && got0.bxn == bxn && got0.sync_err == sync_err &&
          got0.bx0_local == bx0_local,
          $sformatf("clct0 %h kA=%0d nA=%0d", got0, kA, nA));
      if (nB > 0) begin
        n_two++;
        chk(got1.vpf == (nB >= nph) && got1.nhit == 3'(nB) && got1.pat == 3'd7 &&
            got1.key == 5'(kB % 32) && got1.cfeb == 3'(kB / 32),
            $sformatf("clct1 %h kB=%0d nB=%0d", got1, kB, nB));
      end else begin
        chk(!got1.vpf && got1.nhit == 0, "no second clct");
      end
      chk(got_invp == (valid_clct_required && nA < nph), "invp");
      if (got_invp) n_invp++;
    end else begin
      n_none++;
    end
    repeat (6) @(posedge clk);
    #1 chk(clct_sm == 3'd0, "back to idle");
  endtask

  initial begin
    for (int l = 0; l < NLAYER; l++) hs[l] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    trial(6, 0, 2, 4, 4);                       // register defaults
    trial(6, 4, 2, 4, 4);
    trial(4, 3, 0, 4, 5);                       // invalid pattern
    trial(3, 0, 1, 4, 4);                       // below threshold
    for (int i = 0; i < 150; i++) begin
      int nA, nB;
      nA = 1 + $urandom % 6;
      nB = (nA > 1 && $urandom % 2 == 1) ? 1 + $urandom % (nA - 1) : 0;
      trial(nA, nB, $urandom % 4, 1 + $urandom % 6, 1 + $urandom % 6);
    end
    // trigger disabled: nothing happens
    trig_en = 1'b0;
    begin
      int c;
      @(negedge clk);
      for (int l = 0; l < NLAYER; l++) hs[l] = 64'h10;
      c = 0;
      repeat (8) begin @(posedge clk); #1 if (pretrig || clct_latch) c++; end
      chk(c == 0, "trigger disabled");
      for (int l = 0; l < NLAYER; l++) hs[l] = '0;
    end
    chk(n_pretrig > 0 && n_invp > 0 && n_two > 0 && n_none > 0, "all cases seen");
    $display("pretrig=%0d invp=%0d two=%0d none=%0d", n_pretrig, n_invp, n_two, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
