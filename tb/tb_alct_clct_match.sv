// tb_alct_clct_match: checks the ALCT*CLCT time coincidence.
//
// Each trial places one CLCT (latched at clock 20) and one ALCT whose
// delayed copy lands at clock 20+o, for a random ALCT delay d, window width
// w and offset o from -3 to w+3.  Expected events, worked out from the
// offsets alone: o in 0..w-1 gives a match at clock 20+o with window
// position o; otherwise the CLCT closes its window as CLCT-only at clock
// 20+w-1 and the ALCT is reported as ALCT-only at clock 20+o.  Every clock
// is checked for the trigger pulse, the type and the words sent on.  A last
// set of trials clears the allow bits and checks that no trigger pulse
// comes.  Matches, CLCT-only and ALCT-only events are counted.
module tb_alct_clct_match;
  import tmb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  alct_t alct0_in = '0, alct1_in = '0;
  logic clct_latch = 1'b0;
  clct_t clct0_in = '0, clct1_in = '0;
  logic [3:0] alct_delay = '0, clct_width = 4'd3;
  logic allow_match = 1'b1, allow_clct = 1'b1, allow_alct = 1'b1;
  logic trig, match, alct_only, clct_only;
  logic [3:0] match_win;
  alct_t alct0, alct1;
  clct_t clct0, clct1;
  int checks = 0, failures = 0;
  int n_match = 0, n_clct = 0, n_alct = 0;

  alct_clct_match dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic trial(input int d, input int w, input int o, input bit allow);
    alct_t a0, a1;
    clct_t c0, c1;
    int acyc, mcyc, ccyc, alcyc;
    a0 = alct_t'($urandom); a0.vpf = 1'b1; a1 = alct_t'($urandom);
    c0 = clct_t'($urandom); c0.vpf = 1'b1; c1 = clct_t'($urandom);
    acyc  = 20 + o - d;                    // ALCT input clock
    mcyc  = (o >= 0 && o < w) ? 20 + o : -1;
    ccyc  = (mcyc < 0) ? 20 + w - 1 : -1;
    alcyc = (mcyc < 0) ? 20 + o : -1;
    @(negedge clk);
    alct_delay = 4'(d); clct_width = 4'(w);
    allow_match = allow; allow_clct = allow; allow_alct = allow;
    for (int c = 0; c < 45; c++) begin
      alct0_in = (c == acyc) ? a0 : '0;
      alct1_in = (c == acyc) ? a1 : '0;
      clct_latch = (c == 20);
      clct0_in = (c == 20) ? c0 : clct_t'($urandom & 32'h1FFFFE);
      clct1_in = (c == 20) ? c1 : clct_t'($urandom);
      @(posedge clk); #1;
      checks++;
      if (c == mcyc) begin
        n_match++;
        if (trig != allow || !match || alct_only || clct_only || int'(match_win) != o ||
            alct0 !== a0 || alct1 !== a1 || clct0 !== c0 || clct1 !== c1) begin
          failures++; $display("FAIL match d=%0d w=%0d o=%0d", d, w, o);
        end
      end else if (c == ccyc) begin
        n_clct++;
        if (trig != allow || match || alct_only || !clct_only || int'(match_win) != w - 1 ||
            alct0.vpf || clct0 !== c0 || clct1 !== c1) begin
          failures++; $display("FAIL clct-only d=%0d w=%0d o=%0d", d, w, o);
        end
      end else if (c == alcyc) begin
        n_alct++;
        if (trig != allow || match || !alct_only || clct_only || alct0 !== a0 ||
            clct0.vpf) begin
          failures++; $display("FAIL alct-only d=%0d w=%0d o=%0d", d, w, o);
        end
      end else if (trig) begin
        failures++; $display("FAIL stray trigger at %0d (d=%0d w=%0d o=%0d)", c, d, w, o);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    trial(1, 3, 1, 1'b1);            // register defaults: delay 1, width 3
    for (int i = 0; i < 300; i++) begin
      int w;
      w = 1 + $urandom % 8;
      trial($urandom % 16, w, int'($urandom % (w + 7)) - 3, 1'b1);
    end
    for (int i = 0; i < 20; i++) begin
      int w;
      w = 1 + $urandom % 8;
      trial($urandom % 16, w, int'($urandom % (w + 7)) - 3, 1'b0);
    end
    checks++;
    if (n_match == 0 || n_clct == 0 || n_alct == 0) begin
      failures++; $display("FAIL an event type never happened");
    end
    $display("matches=%0d clct_only=%0d alct_only=%0d", n_match, n_clct, n_alct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
