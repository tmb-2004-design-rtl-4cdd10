// tb_mpc_injector: self-checking test of the MPC test-pattern injector.
//
// The bench loads the four frame RAMs with random words (keeping its own
// copy), reads them back, then runs the injector many times with a random
// frame count, started either by a rising edge of the VME inject bit or by
// the TTC command (with and without its enable).  For each run it checks
// that inj_send is high for exactly nframes clocks starting one clock after
// the start is seen, with the frames of addresses 0.. on inj_f, and that a
// second start during a run is ignored.  It plays the transmitter too: a
// fixed number of clocks after each injected pair it pulses accept_latched
// with a random answer, and afterwards reads the answers back by address.
// NTBIN is 16 to keep the run short.
module tb_mpc_injector;

  localparam int unsigned NTBIN = 16, AW = $clog2(NTBIN), ADLY = 5;

  logic clk = 0, rst = 1;
  logic [3:0] wen = '0, ren = '0;
  logic [AW-1:0] adr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [1:0] acc_rdata;
  logic [7:0] nframes = 8'd5;
  logic vme_start = 0, ttc_start = 0, ttc_en = 1;
  logic inj_send;
  logic [15:0] inj_f [4];
  logic accept_latched = 0;
  logic [1:0] accept = '0;

  mpc_injector #(.NTBIN(NTBIN)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] model [4][NTBIN];
  logic [1:0]  ans [NTBIN];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Transmitter model: answer each injected pair ADLY clocks later.
  logic [ADLY-1:0] sent_sr = '0;
  int n_ans;
  always @(posedge clk) begin
    #2;
    sent_sr = {sent_sr[ADLY-2:0], inj_send};
    accept_latched = 1'b0;
    if (sent_sr[ADLY-1]) begin
      accept = 2'($urandom);
      ans[n_ans] = accept;
      n_ans++;
      accept_latched = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int r = 0; r < 4; r++)
      for (int a = 0; a < NTBIN; a++) begin
        @(negedge clk);
        adr = AW'(a); wdata = 16'($urandom); wen = 4'(1 << r);
        model[r][a] = wdata;
        @(negedge clk);
        wen = '0;
      end
    repeat (100) begin
      int r, a;
      r = $urandom % 4; a = $urandom % NTBIN;
      @(negedge clk);
      adr = AW'(a); ren = 4'(1 << r) | (4'($urandom) << (r + 1));
      @(negedge clk);
      chk(rdata == model[r][a], "frame RAM read-back");
    end
    ren = '0;

    for (int run = 0; run < 60; run++) begin
      int nf, how, sent;
      bit expect_run;
      nf  = (run == 0) ? 0 : (run == 1) ? NTBIN : 1 + $urandom % NTBIN;
      how = $urandom % 3;            // 0 VME, 1 TTC enabled, 2 TTC disabled
      expect_run = (how != 2) && nf != 0;
      @(negedge clk);
      nframes = 8'(nf);
      ttc_en = (how != 2);
      n_ans = 0;
      if (how == 0) vme_start = 1'b1;
      else begin ttc_en = (how == 1); ttc_start = 1'b1; end
      @(posedge clk);                 // edge E: start seen
      @(negedge clk);
      ttc_start = 1'b0;
      sent = 0;
      for (int t = 0; t < NTBIN + 3; t++) begin
        @(posedge clk); #1;           // edge E+1+t
        if (expect_run && t < nf) begin
          chk(inj_send, "inj_send during run");
          for (int r = 0; r < 4; r++) chk(inj_f[r] == model[r][t], "injected frame");
        end else begin
          chk(!inj_send, "inj_send idle");
        end
        if (inj_send) sent++;
        // A second start during the run (TTC, then a new VME edge) is ignored.
        if (expect_run && nf > 6 && t == 2) begin
          vme_start = 1'b0; ttc_start = 1'b1; ttc_en = 1'b1;
        end
        if (expect_run && nf > 6 && t == 3) begin
          ttc_start = 1'b0; vme_start = 1'b1;
        end
      end
      chk(sent == (expect_run ? nf : 0), "frames sent");
      @(negedge clk); vme_start = 1'b0;
      repeat (ADLY + 3) @(posedge clk);
      for (int a = 0; a < sent; a++) begin
        @(negedge clk); adr = AW'(a);
        @(negedge clk);
        chk(acc_rdata == ans[a], "stored answer");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
