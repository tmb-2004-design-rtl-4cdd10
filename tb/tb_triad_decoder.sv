// tb_triad_decoder: checks the triad decoder and its one-shots.
//
// A triad is three serial bits on a di-strip line: a start bit 1, the strip
// bit and the half-strip bit.  After the third bit the matching half-strip
// (index 2*strip + half within the di-strip) must go high for exactly
// triad_persist+1 clocks, and no other half-strip may move.  Random triads
// are sent on random di-strips of a full CFEB (6 layers x 8 di-strips) with
// random persistence; then a masked di-strip (hot channel mask bit 0) and a
// disabled CFEB must give nothing.
module tb_triad_decoder;
  localparam int NLY = 6, NTR = 8, ND = NLY * NTR;
  logic clk = 1'b0, rst = 1'b1;
  logic [ND-1:0]   triad = '0;
  logic [ND-1:0]   hcm = '1;
  logic            cfeb_en = 1'b1;
  logic [3:0]      triad_persist = 4'd5;
  logic [ND*4-1:0] hs;
  int checks = 0, failures = 0;

  triad_decoder #(.NLY(NLY), .NTR(NTR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sends one triad on di-strip d and checks the one-shot that follows.
  task automatic one_triad(input int d, input bit s, input bit h, input int persist,
                           input bit expect_hit);
    int idx, high_cycles;
    @(negedge clk);
    triad_persist = 4'(persist);
    triad[d] = 1'b1;
    @(negedge clk) triad[d] = s;
    @(negedge clk) triad[d] = h;
    @(negedge clk) triad[d] = 1'b0;       // third bit taken at the edge before
    idx = 4 * d + 2 * int'(s) + int'(h);
    high_cycles = 0;
    for (int c = 0; c < persist + 4; c++) begin
      logic [ND*4-1:0] exp_hs;
      exp_hs = '0;
      if (expect_hit && c < persist + 1) exp_hs[idx] = 1'b1;
      checks++;
      if (hs !== exp_hs) begin
        failures++;
        $display("FAIL d=%0d s=%b h=%b persist=%0d c=%0d hs=%h", d, s, h, persist, c, hs);
      end
      if (hs[idx]) high_cycles++;
      @(negedge clk);
    end
    if (expect_hit) begin
      checks++;
      if (high_cycles != persist + 1) begin
        failures++;
        $display("FAIL one-shot length %0d, expected %0d", high_cycles, persist + 1);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    one_triad(0, 1'b0, 1'b0, 5, 1'b1);       // 5 = 150 ns persistence
    for (int i = 0; i < 200; i++)
      one_triad($urandom % ND, 1'($urandom), 1'($urandom), $urandom % 16, 1'b1);
    // hot channel mask
    begin
      int d;
      d = $urandom % ND;
      hcm[d] = 1'b0;
      one_triad(d, 1'b1, 1'b1, 5, 1'b0);
      hcm[d] = 1'b1;
      one_triad(d, 1'b1, 1'b1, 5, 1'b1);
    end
    // whole CFEB off
    cfeb_en = 1'b0;
    one_triad(7, 1'b0, 1'b1, 5, 1'b0);
    cfeb_en = 1'b1;
    one_triad(7, 1'b0, 1'b1, 5, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
