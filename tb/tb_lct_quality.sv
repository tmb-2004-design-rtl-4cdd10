// tb_lct_quality: checks the LCT quality code.
//
// All combinations of match type, ALCT quality, accelerator flag, CLCT
// layer count and half-strip flag are applied to LCT 0, with random values
// on LCT 1.  The reference takes the layer count as ALCT quality + 3 plus
// the CLCT layers and walks the code table: matched half-strip with 8 or
// more layers 11..15, matched di-strip 6..10, CLCT-only 5/4, ALCT-only 3,
// matched accelerator muon 2, else 0.  The boundary cases named in the
// table (8 layers, 12 layers, CLCT-only of both kinds) are counted.
module tb_lct_quality;
  logic match, clct_only, alct_only;
  logic [1:0] alct_q0, alct_q1;
  logic alct_amu0, alct_amu1, clct_hsds0, clct_hsds1;
  logic [2:0] clct_nhit0, clct_nhit1;
  logic [3:0] quality0, quality1;
  int checks = 0, failures = 0;

  lct_quality dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_q(input int typ, input int aq, input bit amu, input int nh,
                               input bit hsds);
    int n;
    n = aq + 3 + nh;
    if (typ == 0 && n >= 8) return hsds ? 11 + (n - 8) : 6 + (n - 8);
    if (typ == 2) return hsds ? 5 : 4;
    if (typ == 1) return 3;
    if (typ == 0 && amu) return 2;
    return 0;
  endfunction

  int seen_q [16];

  initial begin
    for (int typ = 0; typ < 4; typ++)            // 0 match, 1 ALCT-only, 2 CLCT-only, 3 none
      for (int aq = 0; aq < 4; aq++)
        for (int amu = 0; amu < 2; amu++)
          for (int nh = 0; nh < 7; nh++)
            for (int hd = 0; hd < 2; hd++) begin
              match = (typ == 0); alct_only = (typ == 1); clct_only = (typ == 2);
              alct_q0 = 2'(aq); alct_amu0 = 1'(amu); clct_nhit0 = 3'(nh); clct_hsds0 = 1'(hd);
              alct_q1 = 2'($urandom); alct_amu1 = 1'($urandom);
              clct_nhit1 = 3'($urandom % 7); clct_hsds1 = 1'($urandom);
              #1;
              checks++;
              if (int'(quality0) != ref_q(typ, aq, 1'(amu), nh, 1'(hd))) begin
                failures++;
                $display("FAIL q0 typ=%0d aq=%0d amu=%0d nh=%0d hd=%0d got %0d", typ, aq,
                         amu, nh, hd, quality0);
              end
              checks++;
              if (int'(quality1) != ref_q(typ, int'(alct_q1), alct_amu1, int'(clct_nhit1),
                                          clct_hsds1)) begin
                failures++;
                $display("FAIL q1");
              end
              seen_q[quality0]++;
            end
    foreach (seen_q[q]) begin
      if (q == 1) continue;                       // code 1 cannot be produced
      checks++;
      if (seen_q[q] == 0) begin failures++; $display("FAIL quality %0d never seen", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
