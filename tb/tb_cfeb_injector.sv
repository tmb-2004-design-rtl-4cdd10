// tb_cfeb_injector: self-checking test of the CFEB pattern injector.
//
// The bench keeps its own model of the injector RAMs (an array written
// with the same data), loads random words through the VME-style ports
// with random CFEB and RAM selections (several at once), reads words back
// through rdata, then starts a play-out and checks, clock by clock, that
// active is high for exactly NTBIN clocks beginning one clock after start
// is seen and that triad[c] holds bin t in layer-major order.  A second
// start while running is ignored; a start held high does not restart.
// Runs with NTBIN=32 and 3 CFEBs to stay short; the RAM layout is the
// same as at full size.
module tb_cfeb_injector;
  import tmb_pkg::*;

  localparam int unsigned NCF = 3, NTBIN = 32, AW = $clog2(NTBIN);

  logic clk = 0, rst = 1;
  logic [NCF-1:0] febsel = '0;
  logic [2:0] wen = '0, ren = '0;
  logic [AW-1:0] rwadr = '0;
  logic [15:0] wdata = '0, rdata;
  logic start = 0, active;
  logic [NLAYER*NTRIAD-1:0] triad [NCF];

  cfeb_injector #(.NCF(NCF), .NTBIN(NTBIN)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] model [NCF][3][NTBIN];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [NCF-1:0] fs, input logic [2:0] we,
                    input int unsigned a, input logic [15:0] d);
    @(negedge clk);
    febsel = fs; rwadr = AW'(a); wdata = d; wen = we;
    @(negedge clk);
    wen = '0;
    for (int c = 0; c < NCF; c++)
      for (int r = 0; r < 3; r++)
        if (fs[c] && we[r]) model[c][r][a] = d;
  endtask

  initial begin
    // Fill every RAM word once, then overwrite with random multi-selects.
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < NCF; c++)
      for (int r = 0; r < 3; r++)
        for (int a = 0; a < NTBIN; a++)
          wr(NCF'(1 << c), 3'(1 << r), a, 16'($urandom));
    repeat (100)
      wr(NCF'($urandom), 3'($urandom), $urandom % NTBIN, 16'($urandom));

    // Read-back through rdata.
    repeat (300) begin
      int c, r, a;
      c = $urandom % NCF; r = $urandom % 3; a = $urandom % NTBIN;
      @(negedge clk);
      febsel = NCF'(1 << c) | (NCF'($urandom) << (c + 1));
      ren = 3'(1 << r) | (3'($urandom) << (r + 1));
      rwadr = AW'(a);
      @(negedge clk);
      chk(rdata == model[c][r][a], "read-back");
    end
    @(negedge clk); ren = '0;
    @(negedge clk);
    chk(rdata == 16'h0, "no read enable gives 0");

    // Play-out, three times: a clean pulse, a held start, a restart try.
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); start = 1;
      @(posedge clk);            // edge E: start seen
      @(negedge clk);
      if (run == 0) start = 0;
      for (int t = 0; t < NTBIN; t++) begin
        @(posedge clk); #1;      // edge E+1+t
        chk(active, "active during play-out");
        for (int c = 0; c < NCF; c++)
          for (int l = 0; l < NLAYER; l++)
            chk(triad[c][l*NTRIAD +: NTRIAD] ==
                model[c][l/2][t][(l%2)*8 +: 8], "played triad bits");
        if (run == 2 && t == NTBIN / 2)     start = 0;  // new rising edge
        if (run == 2 && t == NTBIN / 2 + 1) start = 1;  // while running
      end
      @(posedge clk); #1;
      chk(!active, "active ends after NTBIN bins");
      @(negedge clk); start = 0;
      repeat (5) begin
        @(posedge clk); #1;
        chk(!active, "idle after play-out");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
