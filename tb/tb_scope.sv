// tb_scope: self-checking test of the embedded logic analyser.
//
// The bench drives random probe channels, keeping channel 0 low while the
// scope waits, arms it, triggers it either with a one-clock pulse on
// channel 0 or with a rising edge of force_trig, and remembers the words
// of the trigger clock and the following ones.  It checks the waiting and
// trig_done flags clock by clock (done exactly NTBIN-1 clocks after the
// trigger edge), then reads every bank of every time bin back and compares
// it with what was driven.  It also checks that a disarmed scope ignores
// triggers and that a held force does not retrigger.  NTBIN is 16 here.
module tb_scope;

  localparam int unsigned NCH = 128, NTBIN = 16, AW = $clog2(NTBIN);

  logic clk = 0, rst = 1;
  logic [NCH-1:0] ch = '0;
  logic runstop = 0, force_trig = 0;
  logic [2:0] ram_sel = '0;
  logic [AW-1:0] radr = '0;
  logic [15:0] rdata;
  logic waiting, trig_done;

  scope #(.NCH(NCH), .NTBIN(NTBIN)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [NCH-1:0] exp_w [NTBIN];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NCH-1:0] rnd_word();
    logic [NCH-1:0] w;
    for (int i = 0; i < NCH; i += 32) w[i +: 32] = $urandom;
    w[0] = 1'b0;
    return w;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // Disarmed: a trigger does nothing.
    ch = rnd_word(); ch[0] = 1'b1;
    repeat (3) @(negedge clk);
    chk(!waiting && !trig_done, "idle while stopped");
    ch[0] = 1'b0;

    for (int run = 0; run < 40; run++) begin
      bit use_force;
      use_force = (run % 2 == 1);
      @(negedge clk);
      runstop = 1'b1;
      @(posedge clk); #1;
      chk(waiting && !trig_done, "waiting after arming");
      repeat ($urandom % 10) begin
        @(negedge clk); ch = rnd_word();
        @(posedge clk); #1;
        chk(waiting, "still waiting");
      end
      // trigger clock
      @(negedge clk);
      ch = rnd_word();
      if (use_force) force_trig = 1'b1; else ch[0] = 1'b1;
      exp_w[0] = ch;
      @(posedge clk); #1;              // edge E
      for (int t = 1; t < NTBIN + 4; t++) begin
        @(negedge clk);
        ch = rnd_word();
        if (t % 3 == 0) ch[0] = 1'b1;  // later triggers are ignored
        if (t < NTBIN) exp_w[t] = ch;
        @(posedge clk); #1;            // edge E+t
        chk(!waiting, "not waiting after trigger");
        chk(trig_done == (t >= NTBIN - 1), $sformatf("trig_done at E+%0d", t));
      end
      @(negedge clk); ch[0] = 1'b0;
      // read back every bank of every time bin
      for (int a = 0; a < NTBIN; a++)
        for (int b = 0; b < NCH / 16; b++) begin
          @(negedge clk); radr = AW'(a); ram_sel = 3'(b);
          @(negedge clk);
          chk(rdata == exp_w[a][b*16 +: 16], "read-back");
        end
      // stop; force still held must not retrigger after re-arming
      @(negedge clk); runstop = 1'b0;
      @(posedge clk); #1;
      chk(!waiting && !trig_done, "cleared by stop");
      if (use_force) begin
        @(negedge clk); runstop = 1'b1;
        repeat (3) @(posedge clk); #1;
        chk(waiting, "held force does not retrigger");
        @(negedge clk); runstop = 1'b0; force_trig = 1'b0;
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
