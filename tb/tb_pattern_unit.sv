// tb_pattern_unit: checks the half-strip pattern look-up of one key.
//
// The reference describes each pattern as the set of window positions
// (0..3 = key-1..key+2) that count as a hit on each layer, and counts the
// layers whose window has a hit in that set; the envelope is positions
// 0..2 on every layer except layer 3, where only the key (1) counts.  The
// best pattern has the most layers, ties going to the higher number.
// Random windows plus a straight track and the two steepest bends are
// compared with the unit's outputs.
module tb_pattern_unit;
  logic [3:0] win [6];
  logic [2:0] env_nhit, pat, nhit;
  int checks = 0, failures = 0;

  pattern_unit dut (.win(win), .env_nhit(env_nhit), .pat(pat), .nhit(nhit));

  // allowed window positions, one 4-bit set per layer: bit i = position i
  logic [3:0] allow [8][6] = '{
    '{4'b0111, 4'b0111, 4'b0111, 4'b0010, 4'b0111, 4'b0111},  // envelope
    '{4'b0100, 4'b0100, 4'b0110, 4'b0010, 4'b0011, 4'b0001},  // 1
    '{4'b0001, 4'b0001, 4'b0011, 4'b0010, 4'b0110, 4'b0100},  // 2
    '{4'b0010, 4'b0010, 4'b0010, 4'b0010, 4'b0001, 4'b0001},  // 3
    '{4'b0010, 4'b0010, 4'b0010, 4'b0010, 4'b0100, 4'b0100},  // 4
    '{4'b0100, 4'b0100, 4'b0110, 4'b0010, 4'b0010, 4'b0010},  // 5
    '{4'b0001, 4'b0001, 4'b0011, 4'b0010, 4'b0010, 4'b0010},  // 6
    '{4'b0010, 4'b0010, 4'b0010, 4'b0010, 4'b0010, 4'b0010}   // 7
  };

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_win();
    int cnt [8];
    int bp, bn;
    for (int p = 0; p < 8; p++) begin
      cnt[p] = 0;
      for (int l = 0; l < 6; l++) if ((win[l] & allow[p][l]) != 0) cnt[p]++;
    end
    bp = 0; bn = 0;
    for (int p = 7; p >= 1; p--) if (cnt[p] > bn) begin bn = cnt[p]; bp = p; end
    #1;
    checks++;
    if (int'(env_nhit) != cnt[0] || int'(pat) != bp || int'(nhit) != bn) begin
      failures++;
      $display("FAIL win=%h %h %h %h %h %h env=%0d/%0d pat=%0d/%0d nhit=%0d/%0d",
               win[0], win[1], win[2], win[3], win[4], win[5],
               env_nhit, cnt[0], pat, bp, nhit, bn);
    end
  endtask

  initial begin
    // straight track through the key: pattern 7, six layers
    for (int l = 0; l < 6; l++) win[l] = 4'b0010;
    check_win();
    checks++; if (pat != 3'd7 || nhit != 3'd6) failures++;
    // steepest bend one way: pattern 1
    win = '{4'b0100, 4'b0100, 4'b0100, 4'b0010, 4'b0001, 4'b0001};
    check_win();
    checks++; if (pat != 3'd1 || nhit != 3'd6) failures++;
    // and the other way: pattern 2
    win = '{4'b0001, 4'b0001, 4'b0001, 4'b0010, 4'b0100, 4'b0100};
    check_win();
    checks++; if (pat != 3'd2 || nhit != 3'd6) failures++;
    // nothing hit
    for (int l = 0; l < 6; l++) win[l] = 4'b1000;
    check_win();
    checks++; if (pat != 3'd0 || nhit != 3'd0 || env_nhit != 3'd0) failures++;
    for (int i = 0; i < 20000; i++) begin
      for (int l = 0; l < 6; l++) win[l] = 4'($urandom & $urandom);
      check_win();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
