// tb_best2_clct: checks the best and second-best key selection.
//
// The reference scans the keys from the top down and keeps a key whenever
// its rank {layers, pattern} is at least the best so far, which leaves the
// lowest key among equal ranks.  The second search skips every key within
// BUSY_HW half-strips of the best.  A key with no layers hit never counts.
// Runs at 24 keys with random and sparse inputs.
module tb_best2_clct;
  localparam int NK = 24, BH = 2, KW = $clog2(NK);
  logic [2:0] pat [NK], nhit [NK];
  logic found0, found1;
  logic [KW-1:0] key0, key1;
  logic [2:0] pat0, pat1, nhit0, nhit1;
  int checks = 0, failures = 0;

  best2_clct #(.NKEY(NK), .BUSY_HW(BH)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_once();
    int b0, b1, r0, r1;
    b0 = -1; r0 = 0;
    for (int k = NK - 1; k >= 0; k--)
      if (nhit[k] != 0 && int'(nhit[k]) * 8 + int'(pat[k]) >= r0) begin
        r0 = int'(nhit[k]) * 8 + int'(pat[k]); b0 = k;
      end
    b1 = -1; r1 = 0;
    if (b0 >= 0)
      for (int k = NK - 1; k >= 0; k--)
        if ((k - b0 > BH || b0 - k > BH) && nhit[k] != 0 &&
            int'(nhit[k]) * 8 + int'(pat[k]) >= r1) begin
          r1 = int'(nhit[k]) * 8 + int'(pat[k]); b1 = k;
        end
    #1;
    checks++;
    if (found0 != (b0 >= 0) || (b0 >= 0 && (int'(key0) != b0 ||
        int'(nhit0) * 8 + int'(pat0) != r0))) begin
      failures++;
      $display("FAIL best: found=%b key=%0d exp=%0d", found0, key0, b0);
    end
    checks++;
    if (found1 != (b1 >= 0) || (b1 >= 0 && (int'(key1) != b1 ||
        int'(nhit1) * 8 + int'(pat1) != r1))) begin
      failures++;
      $display("FAIL second: found=%b key=%0d exp=%0d", found1, key1, b1);
    end
  endtask

  initial begin
    for (int k = 0; k < NK; k++) begin pat[k] = '0; nhit[k] = '0; end
    check_once();
    for (int i = 0; i < 5000; i++) begin
      for (int k = 0; k < NK; k++) begin
        if ($urandom % 4 == 0) begin
          nhit[k] = 3'(1 + $urandom % 6);
          pat[k]  = 3'(1 + $urandom % 7);
        end else begin
          nhit[k] = '0; pat[k] = '0;
        end
        if (i % 2 == 1) pat[k] = (nhit[k] != 0) ? 3'd7 : 3'd0;   // many ties
      end
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
