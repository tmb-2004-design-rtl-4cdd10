// tb_tmb2004_top: end-to-end test of the trigger motherboard at full size.
//
// The board is run with its default parameters (5 CFEBs, 160 key
// half-strips, 3564-crossing LHC orbit).  The bench plays the CFEBs, the
// ALCT, the CCB and the MPC and talks to the board over VME:
//  * CFEB links: hits are serialised as triads (start bit, strip bit,
//    half-strip bit).  The test builds a layer-major word (bit layer*8 +
//    di-strip) and spreads it over the 24 80 MHz pins of each CFEB with the
//    connector table: the first-listed layer of a pin while the clock is
//    low (sampled on the rising edge), the second while it is high.
//  * ALCT: muon words presented on the 40 MHz clock.
//  * CCB: TTC command bytes with strobe.
//  * MPC: the 32 output pins are sampled in both halves of the crossing;
//    the accept pin returns an answer.
// Each mechanism is counted and must happen at least once: VME ID read
// (revcode), register write/read, pre-trigger, CLCT latch, CLCT-only LCT,
// ALCT*CLCT match, ALCT-only LCT, LCT duplication, invalid pattern, hot
// channel masking, TTC stop/start, bunch-counter wrap, sync error and its
// clear, TTC command from the VME generator, MPC accept, a track played
// from the CFEB pattern injector, frames sent by the MPC injector, a scope
// trace triggered by a pre-trigger, JTAG routed from each of its two sources.  The MPC frames
// are checked field by field against the track that was injected.
module tb_tmb2004_top;
  import tmb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [23:0] cfeb_rx [NCFEB];
  alct_t alct0_rx = '0, alct1_rx = '0;
  logic [7:0] ccb_cmd = '0;
  logic ccb_cmd_strobe = 1'b0;
  logic vme_strobe = 1'b0, vme_write = 1'b0, vme_lword = 1'b0;
  logic [23:0] vme_adr = '0;
  logic [5:0] vme_am = 6'h39;
  logic [15:0] vme_wdata = '0, vme_rdata;
  logic vme_dtack;
  logic [4:0] ga = 5'd21, sw_adr = 5'd3;
  logic geo_sel = 1'b1;
  logic [31:0] mpc_tx_pins;
  logic mpc_accept_pin = 1'b0;
  logic pretrig, clct_latch, invp, tmb_trig, tmb_match, tmb_alct_only, tmb_clct_only;
  logic mpc_accept_latched, sync_err, mpc_inject, run_enable, cfeb_inj_active, mpc_inj_send;
  logic [1:0] mpc_accept;
  logic [NCFEB-1:0] active_feb;
  logic [11:0] bxn;
  logic [7:0] boot_jtag = '0;
  logic boot_tdo;
  logic [NJTAG-1:0] jtag_tck, jtag_tms, jtag_tdi, jtag_tdo = '0;
  int checks = 0, failures = 0, n_jtag = 0;

  tmb2004_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- event counters ----------------
  int n_pretrig, n_latch, n_trig, n_match, n_clct_only, n_alct_only, n_invp, n_acc;
  always @(posedge clk) begin
    #2;
    if (!rst) begin
      if (pretrig) n_pretrig++;
      if (clct_latch) n_latch++;
      if (invp) n_invp++;
      if (tmb_trig) begin
        n_trig++;
        if (tmb_match) n_match++;
        if (tmb_clct_only) n_clct_only++;
        if (tmb_alct_only) n_alct_only++;
      end
      if (mpc_accept_latched) n_acc++;
    end
  end

  // ---------------- CFEB link drivers ----------------
  logic [47:0] next_w [NCFEB];   // word for the coming clock, set by the test
  logic [47:0] cur_w  [NCFEB];
  initial for (int c = 0; c < NCFEB; c++) begin
    next_w[c] = '0; cur_w[c] = '0; cfeb_rx[c] = '0;
  end
  // Connector table, one entry per input pair: {first layer, second layer,
  // triad}, typed in from the CFEB cable pin list.
  int pin_tab [24][3] = '{
    '{0,3,0}, '{0,3,2}, '{5,4,0}, '{5,4,2}, '{1,2,0}, '{1,2,2},
    '{0,3,4}, '{0,3,6}, '{5,4,4}, '{5,4,6}, '{1,2,4}, '{1,2,6},
    '{1,2,7}, '{1,2,5}, '{5,4,7}, '{5,4,5}, '{0,3,7}, '{0,3,5},
    '{1,2,3}, '{1,2,1}, '{5,4,3}, '{5,4,1}, '{0,3,3}, '{0,3,1}};
  always @(negedge clk) begin
    #1;
    for (int c = 0; c < NCFEB; c++) begin
      cur_w[c] = next_w[c];
      for (int p = 0; p < 24; p++)
        cfeb_rx[c][p] = cur_w[c][pin_tab[p][0]*8 + pin_tab[p][2]];
    end
  end
  always @(posedge clk) begin
    #1;
    for (int c = 0; c < NCFEB; c++)
      for (int p = 0; p < 24; p++)
        cfeb_rx[c][p] = cur_w[c][pin_tab[p][1]*8 + pin_tab[p][2]];
  end

  // Sends one track: half-strip key on the layers set in lmask, as triads.
  // Three clocks: start bits, strip bits, half-strip bits.
  task automatic send_track2(input int keyA, input logic [5:0] lmA,
                             input int keyB, input logic [5:0] lmB);
    for (int phase = 0; phase < 4; phase++) begin
      @(posedge clk);
      #2;
      for (int c = 0; c < NCFEB; c++) next_w[c] = '0;
      if (phase < 3)
        for (int t = 0; t < 2; t++) begin
          int key;
          logic [5:0] lm;
          key = (t == 0) ? keyA : keyB;
          lm  = (t == 0) ? lmA : lmB;
          if (key >= 0)
            for (int l = 0; l < NLAYER; l++)
              if (lm[l]) begin
                int cf, h, d;
                logic bitv;
                cf = key / 32; h = key % 32; d = h / 4;
                bitv = (phase == 0) ? 1'b1 : (phase == 1) ? 1'((h >> 1) & 1) : 1'(h & 1);
                next_w[cf][l * 8 + d] = bitv;
              end
        end
    end
  endtask

  task automatic send_track(input int key, input logic [5:0] lm);
    send_track2(key, lm, -1, 6'b0);
  endtask

  // ---------------- VME ----------------
  task automatic vme(input bit wr, input logic [7:0] radr, input logic [15:0] wd,
                     output logic [15:0] rd);
    bit ack;
    @(negedge clk);
    vme_strobe = 1'b1; vme_write = wr; vme_adr = {5'd21, 11'b0, radr};
    vme_am = 6'h39; vme_wdata = wd; vme_lword = 1'b1;
    @(negedge clk);
    vme_strobe = 1'b0;
    ack = vme_dtack; rd = vme_rdata;
    chk(ack, $sformatf("dtack for %h", radr));
  endtask

  task automatic vme_wr(input logic [7:0] radr, input logic [15:0] wd);
    logic [15:0] rd;
    vme(1'b1, radr, wd, rd);
  endtask

  task automatic ttc(input logic [7:0] cmd);
    @(negedge clk);
    ccb_cmd = cmd; ccb_cmd_strobe = 1'b1;
    @(negedge clk);
    ccb_cmd_strobe = 1'b0;
  endtask

  // ---------------- MPC capture ----------------
  logic [31:0] cap_f0, cap_f1;
  logic [63:0] cap_hist [$];
  int n_frames;
  always @(posedge clk) begin
    #2;
    if (mpc_tx_pins != '0) begin
      cap_f0 = mpc_tx_pins;
      @(negedge clk);
      #2;
      cap_f1 = mpc_tx_pins;
      cap_hist.push_back({cap_f1, cap_f0});
      n_frames++;
    end
  end

  // Waits for the next TMB trigger, up to max clocks.
  task automatic wait_trig(input int max, output bit seen);
    seen = 1'b0;
    for (int i = 0; i < max && !seen; i++) begin
      @(posedge clk); #1;
      if (tmb_trig) seen = 1'b1;
    end
    repeat (3) @(posedge clk);
  endtask

  int n_scope, n_mpcinj, n_pre0, n_inj, n_masked_ok, n_stop_ok, n_wrap, n_sync, n_sync_clr, n_vmecmd, n_dup, n_rw, n_id;
  logic [11:0] last_bxn;
  always @(posedge clk) begin
    #3;
    if (!rst && last_bxn == 12'd3563 && bxn == 12'd0) n_wrap++;
    last_bxn = bxn;
  end

  initial begin
    logic [15:0] rd;
    bit seen;
    int key;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (4) @(posedge clk);

    // ---- VME: identity and defaults
    vme(1'b0, 8'h06, 0, rd);
    chk(rd == 16'h38C8, $sformatf("revcode %h", rd));
    if (rd == 16'h38C8) n_id++;
    vme(1'b0, 8'h70, 0, rd);
    chk(rd == 16'h5245, "seq_clct default");
    vme_wr(8'hB2, 16'h0033);                   // alct_delay 3, window 3
    vme(1'b0, 8'hB2, 0, rd);
    chk(rd[7:0] == 8'h33, "tmbtim write");
    if (rd[7:0] == 8'h33) n_rw++;

    // ---- CLCT-only LCT: six-layer straight track
    key = 77;
    send_track(key, 6'b111111);
    wait_trig(40, seen);
    chk(seen && tmb_clct_only, "clct-only trigger");
    vme(1'b0, 8'h78, 0, rd);
    chk(rd[0] && rd[3:1] == 3'd6 && rd[6:4] == 3'd7 && rd[13:9] == 5'(key % 32) &&
        rd[15:14] == 2'(key / 32), $sformatf("latched clct0 %h", rd));
    vme(1'b0, 8'h88, 0, rd);
    // frame 0: vpf, quality 5 (CLCT only, half-strip), hsds, pattern 7
    chk(rd[15] && rd[14:11] == 4'd5 && rd[10] && rd[9:7] == 3'd7, $sformatf("mpc0 f0 %h", rd));
    chk(cap_f0[15:0] == rd, "pins frame 0");
    vme(1'b0, 8'h8A, 0, rd);
    chk(rd[7:0] == 8'(key) && rd[15:12] == 4'd5, $sformatf("mpc0 f1 %h", rd));
    chk(cap_f1[15:0] == rd, "pins frame 1");
    repeat (10) @(posedge clk);

    // ---- ALCT*CLCT match with one ALCT and two CLCTs (duplication)
    fork
      send_track2(40, 6'b111111, 120, 6'b111101);
      begin
        alct_t a;
        wait (pretrig);
        @(negedge clk);
        a = '0; a.vpf = 1'b1; a.quality = 2'd3; a.key = 7'd55; a.bxn = 2'd1;
        alct0_rx = a;
        @(negedge clk);
        alct0_rx = '0;
      end
    join
    wait_trig(40, seen);
    chk(seen && tmb_match, "match trigger");
    vme(1'b0, 8'h88, 0, rd);
    // 3 + 3 + 6 = 12 layers, half-strip: quality 15
    chk(rd[15] && rd[14:11] == 4'd15 && rd[6:0] == 7'd55, $sformatf("match lct0 f0 %h", rd));
    vme(1'b0, 8'h8C, 0, rd);
    // second LCT re-uses the only ALCT; second CLCT has 5 layers: 3+3+5 = 11 -> 14
    chk(rd[15] && rd[6:0] == 7'd55 && rd[14:11] == 4'd14, $sformatf("dup lct1 f0 %h", rd));
    if (rd[15] && rd[6:0] == 7'd55) n_dup++;
    vme(1'b0, 8'h8E, 0, rd);
    chk(rd[7:0] == 8'd120, $sformatf("lct1 key %h", rd));
    repeat (10) @(posedge clk);

    // ---- ALCT-only: allowed through register 86 bit 2
    vme_wr(8'h86, 16'h00FF);
    @(negedge clk);
    alct0_rx = '0; alct0_rx.vpf = 1'b1; alct0_rx.key = 7'd9; alct0_rx.quality = 2'd1;
    @(negedge clk);
    alct0_rx = '0;
    wait_trig(20, seen);
    chk(seen && tmb_alct_only, "alct-only trigger");
    vme(1'b0, 8'h88, 0, rd);
    chk(rd[15] && rd[14:11] == 4'd3 && rd[6:0] == 7'd9, $sformatf("alct-only f0 %h", rd));
    vme(1'b0, 8'h3A, 0, rd);
    chk(rd[0] && rd[10:4] == 7'd9, "alct received register");
    vme_wr(8'h86, 16'h00FB);

    // ---- MPC accept: the MPC answers on the accept pin
    fork
      begin
        repeat (40) begin
          @(posedge clk); #2 mpc_accept_pin = 1'b1;     // LCT1 accept (high half)
          @(negedge clk); #2 mpc_accept_pin = 1'b1;     // LCT0 accept (low half)
        end
        mpc_accept_pin = 1'b0;
      end
      begin
        send_track(100, 6'b111111);
        wait_trig(40, seen);
      end
    join
    repeat (10) @(posedge clk);
    chk(n_acc > 0, "accept latched");
    vme(1'b0, 8'h86, 0, rd);
    chk(rd[10:9] == 2'b11, $sformatf("mpc accept read-back %h", rd));

    // ---- invalid pattern: four layers with nph_pattern = 5
    vme_wr(8'h70, 16'h5645);
    send_track(30, 6'b001111);
    repeat (20) @(posedge clk);
    chk(n_invp > 0, "invalid pattern flagged");
    vme_wr(8'h70, 16'h5245);
    repeat (10) @(posedge clk);

    // ---- hot channel mask: di-strip of key 150 off on every layer
    begin
      int n_before;
      n_before = n_pretrig;
      // CFEB4 di-strip 5: words 62, 64, 66 (two layers each)
      vme_wr(8'h62, 16'hDFDF); vme_wr(8'h64, 16'hDFDF); vme_wr(8'h66, 16'hDFDF);
      send_track(4 * 32 + 5 * 4 + 2, 6'b111111);
      repeat (20) @(posedge clk);
      chk(n_pretrig == n_before, "masked di-strip gives no trigger");
      if (n_pretrig == n_before) n_masked_ok++;
      vme_wr(8'h62, 16'hFFFF); vme_wr(8'h64, 16'hFFFF); vme_wr(8'h66, 16'hFFFF);
    end

    // ---- TTC stop / start trigger
    begin
      int n_before;
      ttc(8'h07);
      repeat (2) @(posedge clk);
      chk(!run_enable, "stop trigger");
      n_before = n_pretrig;
      send_track(60, 6'b111111);
      repeat (20) @(posedge clk);
      chk(n_pretrig == n_before, "no trigger while stopped");
      ttc(8'h06);
      repeat (2) @(posedge clk);
      chk(run_enable, "start trigger");
      send_track(60, 6'b111111);
      repeat (20) @(posedge clk);
      chk(n_pretrig == n_before + 1, "trigger after start");
      if (n_pretrig == n_before + 1) n_stop_ok++;
    end

    // ---- bunch counter: BX0 at the wrong time sets sync error
    wait (bxn == 12'd100);
    ttc(8'h01);
    repeat (2) @(posedge clk);
    chk(sync_err, "sync error set");
    if (sync_err) n_sync++;
    // a CLCT latched now carries the sync error to the MPC frame
    send_track(10, 6'b111111);
    wait_trig(40, seen);
    vme(1'b0, 8'h8A, 0, rd);
    chk(rd[9], "sync error in frame 1");
    ttc(8'h03);                                 // L1 reset clears it
    repeat (2) @(posedge clk);
    chk(!sync_err, "sync error cleared");
    if (!sync_err) n_sync_clr++;

    // ---- TTC command from the VME generator: bunch counter reset
    vme_wr(8'h9C, 16'h3201);                    // disconnect CCB, command 32
    vme_wr(8'h9C, 16'h3203);                    // strobe
    repeat (3) @(posedge clk);
    chk(bxn < 12'd5, $sformatf("bxn reset from VME command, bxn=%0d", bxn));
    if (bxn < 12'd5) n_vmecmd++;
    vme_wr(8'h9C, 16'h0000);

    // ---- full orbit: wrap at 3564 with BX0 on time, no sync error
    // the decoded BX0 reaches the counter one clock after the command
    wait (bxn == 12'd3563);
    ttc(8'h01);
    repeat (5) @(posedge clk);
    chk(!sync_err, "BX0 on time keeps sync");

    // ---- CFEB pattern injector: a track loaded over VME into CFEB 3
    vme_wr(8'h42, 16'h211F);                    // select CFEB 3, inject into CFEB 3 only
    vme_wr(8'h46, 16'h0000);
    for (int a = 0; a < 256; a++) vme_wr(8'h44, 16'((a << 6) | 7));
    // half-strip 13: di-strip 3, strip bit 0, half bit 1, all six layers
    // (data and address first, then the write enable pulsed)
    vme_wr(8'h44, 16'h0000);
    vme_wr(8'h46, 16'h0808); vme_wr(8'h44, 16'((0 << 6) | 7)); vme_wr(8'h44, 16'h0000);
    vme_wr(8'h46, 16'h0000); vme_wr(8'h44, 16'((1 << 6) | 7)); vme_wr(8'h44, 16'h0000);
    vme_wr(8'h46, 16'h0808); vme_wr(8'h44, 16'((2 << 6) | 7)); vme_wr(8'h44, 16'h0000);
    vme_wr(8'h44, 16'((2 << 6) | (2 << 3)));    // read RAM Ly23, bin 2
    vme(1'b0, 8'h48, 0, rd);
    chk(rd == 16'h0808, $sformatf("injector read-back %h", rd));
    n_pre0 = n_pretrig;
    vme_wr(8'h42, 16'hA11F);                    // start
    wait (cfeb_inj_active);
    wait_trig(40, seen);
    chk(seen && n_pretrig == n_pre0 + 1, "trigger from injected track");
    vme(1'b0, 8'h78, 0, rd);
    chk(rd[0] && rd[13:9] == 5'd13 && rd[15:14] == 2'd3, $sformatf("injected clct0 %h", rd));
    if (seen && rd[13:9] == 5'd13 && rd[15:14] == 2'd3) n_inj++;
    vme_wr(8'h42, 16'h7C1F);                    // back to the defaults
    wait (!cfeb_inj_active);

    // ---- MPC test-pattern injector: two frame pairs, started by TTC
    for (int a = 0; a < 2; a++)
      for (int r = 0; r < 4; r++) begin
        vme_wr(8'h94, 16'h8000 | 16'(r << 8) | 16'(a + 1));
        vme_wr(8'h92, 16'((a << 8) | (1 << r)));
        vme_wr(8'h92, 16'h0000);
      end
    vme_wr(8'h92, 16'((1 << 8) | (1 << 6)));    // read RAM 2, address 1
    vme(1'b0, 8'h96, 0, rd);
    chk(rd == 16'h8202, $sformatf("mpc injector read-back %h", rd));
    vme_wr(8'h90, 16'h0202);                    // 2 frames, TTC start enabled
    begin
      int n0;
      n0 = cap_hist.size();
      ttc(8'h24);
      repeat (10) @(posedge clk);
      chk(cap_hist.size() == n0 + 2, "two injected pairs on the pins");
      if (cap_hist.size() == n0 + 2) begin
        bit ok;
        ok = 1'b1;
        for (int a = 0; a < 2; a++)
          ok &= (cap_hist[n0 + a] == {16'h8300 | 16'(a + 1), 16'h8100 | 16'(a + 1),
                                      16'h8200 | 16'(a + 1), 16'h8000 | 16'(a + 1)});
        chk(ok, "injected frames on the pins");
        if (ok) n_mpcinj++;
      end
    end
    vme_wr(8'h90, 16'h0205);

    // ---- embedded logic analyser: armed, triggered by a pre-trigger
    vme_wr(8'h98, 16'h0001);                    // run, bank 0, address 0
    vme(1'b0, 8'h98, 0, rd);
    chk(rd[6] && !rd[7], "scope waiting");
    send_track(90, 6'b111111);
    wait_trig(40, seen);
    repeat (300) @(posedge clk);
    vme(1'b0, 8'h98, 0, rd);
    chk(rd[7] && !rd[6], "scope triggered");
    vme(1'b0, 8'h9A, 0, rd);
    chk(rd[0], "scope bin 0 holds the pre-trigger");
    vme_wr(8'h98, 16'h0101 | (16'd4 << 2));     // bank 4, address 1: bxn[10:0] at ch65..
    vme(1'b0, 8'h9A, 0, rd);
    begin
      logic [15:0] rd0;
      vme_wr(8'h98, 16'h0001 | (16'd4 << 2));   // bank 4, address 0
      vme(1'b0, 8'h9A, 0, rd0);
      chk(rd0[0] && rd[12:1] == rd0[12:1] + 12'd1, $sformatf("scope bxn channels %h %h", rd0, rd));
      if (rd0[0] && rd[12:1] == rd0[12:1] + 12'd1) n_scope++;
    end
    vme_wr(8'h98, 16'h0000);

    // ---- JTAG: user register drives the RAT chain, then the bootstrap
    //      register takes over and drives the ALCT chain
    vme_wr(8'h10, 16'h006D);                    // sel 1101, tck 1, tms 0, tdi 1
    jtag_tdo = 5'b10000;
    vme(1'b0, 8'h10, 0, rd);
    begin
      bit ok;
      ok = jtag_tck == 5'b10000 && jtag_tdi == 5'b10000 && jtag_tms == 5'b01111 && rd[15] && rd[6:0] == 7'h6D;
      boot_jtag = 8'b1_0000_1_0_1;              // bootstrap source, ALCT chain
      jtag_tdo = 5'b00001;
      @(negedge clk);
      ok &= jtag_tck == 5'b00001 && jtag_tdi == 5'b00001 && jtag_tms == 5'b11110 && boot_tdo;
      chk(ok, "jtag chain routing");
      if (ok) n_jtag++;
      boot_jtag = '0;
    end

    // ---- every mechanism must have happened
    chk(n_jtag > 0, "jtag");
    chk(n_scope > 0, "scope");
    chk(n_mpcinj > 0, "mpc injector");
    chk(n_inj > 0, "cfeb injector");
    chk(n_id > 0, "id read");
    chk(n_rw > 0, "register write/read");
    chk(n_pretrig > 0, "pre-trigger");
    chk(n_latch > 0, "clct latch");
    chk(n_clct_only > 0, "clct-only lct");
    chk(n_match > 0, "match lct");
    chk(n_alct_only > 0, "alct-only lct");
    chk(n_dup > 0, "duplication");
    chk(n_invp > 0, "invalid pattern");
    chk(n_masked_ok > 0, "hot channel mask");
    chk(n_stop_ok > 0, "stop/start");
    chk(n_wrap > 0, "bxn wrap");
    chk(n_sync > 0 && n_sync_clr > 0, "sync error set/clear");
    chk(n_vmecmd > 0, "vme ttc command");
    chk(n_acc > 0, "mpc accept");
    chk(n_frames > 0, "mpc frames");
    $display("pretrig=%0d latch=%0d trig=%0d match=%0d clct_only=%0d alct_only=%0d",
             n_pretrig, n_latch, n_trig, n_match, n_clct_only, n_alct_only);
    $display("invp=%0d dup=%0d wrap=%0d sync=%0d accept=%0d frames=%0d",
             n_invp, n_dup, n_wrap, n_sync, n_acc, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
