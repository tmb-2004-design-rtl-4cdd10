// tmb2004_top: trigger path of the CSC Trigger Motherboard (TMB).
//
// What it does: the board takes the comparator hits of the five cathode
// front-end boards (CFEBs) and the anode LCTs of the ALCT board, finds the
// two best cathode patterns, matches them in time with the ALCT muons and
// sends the resulting pair of LCTs to the muon port card (MPC).  All
// settings come from the VME register file, and TTC commands arrive over
// the clock and control board (CCB) backplane.
//
// How: per CFEB, ddr_demux turns the 24 80 MHz link pins into 48 triad bits
// per 40 MHz clock (6 layers x 8 di-strips) and triad_decoder turns them
// into half-strip one-shots; the 5 x 32 half-strips of each layer form the
// image that clct_sequencer searches.  Its latched CLCTs and the ALCT pair
// go through alct_clct_match, lct_duplicate and lct_quality into mpc_tx.
// ttc_decoder and bxn_counter give the run control and bunch count; the
// CLCT words carry the two low bxn bits, bx0_local and sync_err.
// Two test injectors sit on the path: cfeb_injector (registers 42-48)
// replaces the triad bits of the CFEBs in its mask while it plays, and
// mpc_injector (registers 90-96, or the TTC MPC-inject command) sends
// ready-made frame pairs through mpc_tx and stores the MPC's answers.
// scope (registers 98/9A) records 128 probe channels from a pre-trigger.
// jtag_chain_mux routes the user JTAG register (10) or the bootstrap
// register bits (boot_jtag, from board logic outside the FPGA) to one of
// the five JTAG chains (jtag_tck/tms/tdi/tdo).
//
// Interface: cfeb_rx[c] are the 24 pins of CFEB c; alct0_rx/alct1_rx are
// the ALCT muon words already demultiplexed to the 40 MHz clock (the ALCT
// receiver is not part of this design); the VME port is the register
// interface of vme_regs; mpc_tx_pins/mpc_accept_pin are the MPC link.
// Event outputs (pretrig, clct_latch, tmb_trig and the match type,
// mpc_inj_send) pulse for one clock so a test bench or scope can count
// them; cfeb_inj_active is high while the CFEB injector plays.
//
// The CFEB cable pin map (which layer and triad each pin carries in each
// half of the crossing) follows the CFEB connector table; cfeb_rx[c][i] is
// the i-th input pair of that connector, the clock pair left out.
// Own choices of this design (the document gives the register fields and
// the data formats): the first-listed signal of a pin is taken to be the
// one sent in the first half-crossing, sampled on the rising edge; TTC
// start/stop trigger set/clear a run flag that starts set; TTC L1 reset
// clears the sync error; the global CLCT trigger enable is the AND of that
// flag with clct_pat_trig_en (register 68 bit 0).
module tmb2004_top
  import tmb_pkg::*;
#(
  parameter logic [15:0] MONTHDAY = 16'h0608,
  parameter logic [15:0] YEAR     = 16'h2004
) (
  input  logic        clk,
  input  logic        rst,
  // CFEB links, 80 MHz, 24 pins each
  input  logic [23:0] cfeb_rx [NCFEB],
  // ALCT muons, already on the 40 MHz clock
  input  alct_t       alct0_rx,
  input  alct_t       alct1_rx,
  // CCB backplane
  input  logic [7:0]  ccb_cmd,
  input  logic        ccb_cmd_strobe,
  // VME
  input  logic        vme_strobe,
  input  logic        vme_write,
  input  logic [23:0] vme_adr,
  input  logic        vme_lword,
  input  logic [5:0]  vme_am,
  input  logic [15:0] vme_wdata,
  output logic [15:0] vme_rdata,
  output logic        vme_dtack,
  input  logic [4:0]  ga,
  input  logic [4:0]  sw_adr,
  input  logic        geo_sel,
  // MPC link
  output logic [31:0] mpc_tx_pins,
  input  logic        mpc_accept_pin,
  // event and status outputs
  output logic        pretrig,
  output logic        clct_latch,
  output logic        invp,
  output logic        tmb_trig,
  output logic        tmb_match,
  output logic        tmb_alct_only,
  output logic        tmb_clct_only,
  output logic        mpc_accept_latched,
  output logic [1:0]  mpc_accept,
  output logic [NCFEB-1:0] active_feb,
  output logic [11:0] bxn,
  output logic        sync_err,
  output logic        mpc_inject,
  output logic        run_enable,
  output logic        cfeb_inj_active,
  output logic        mpc_inj_send,
  // JTAG: bootstrap-register source (bit 7 source select, 6:3 chain, 2 tck,
  // 1 tms, 0 tdi) and the five chains
  input  logic [7:0]  boot_jtag,
  output logic        boot_tdo,
  output logic [NJTAG-1:0] jtag_tck,
  output logic [NJTAG-1:0] jtag_tms,
  output logic [NJTAG-1:0] jtag_tdi,
  input  logic [NJTAG-1:0] jtag_tdo
);

  // ---------------- VME register file ----------------
  logic [15:0]     cfg  [NREG];
  logic [15:0]     stat [NREG];
  logic [NREG-1:0] wr_pulse;

  vme_regs #(.MONTHDAY(MONTHDAY), .YEAR(YEAR)) u_vme (
    .clk, .rst, .vme_strobe, .vme_write, .vme_adr, .vme_lword, .vme_am,
    .vme_wdata, .vme_rdata, .vme_dtack, .ga, .sw_adr, .geo_sel,
    .cfg(cfg), .stat(stat), .wr_pulse(wr_pulse));

  // Configuration fields.
  logic [3:0]  triad_persist;
  logic [2:0]  hs_thresh, nph_pattern;
  logic [1:0]  drift_delay;
  logic [3:0]  flush_delay;
  logic        valid_clct_required, all_cfebs_active, clct_pat_trig_en;
  logic [4:0]  cfeb_mask_all;
  logic [3:0]  csc_id;
  logic [1:0]  sync_err_en;
  logic        allow_alct, allow_clct, allow_match;
  logic [3:0]  mpc_delay, alct_delay, clct_width;
  logic [11:0] lhc_cycle, bxn_offset;
  logic        vme_cmd_enable;
  logic [7:0]  vme_cmd;

  assign triad_persist       = cfg[R_SEQ_CLCT][3:0];
  assign hs_thresh           = cfg[R_SEQ_CLCT][6:4];
  assign nph_pattern         = cfg[R_SEQ_CLCT][12:10];
  assign drift_delay         = cfg[R_SEQ_CLCT][14:13];
  assign flush_delay         = cfg[R_SEQMOD][3:0];
  assign valid_clct_required = cfg[R_SEQMOD][7];
  assign clct_pat_trig_en    = cfg[R_SEQ_TRIG_EN][0];
  assign all_cfebs_active    = cfg[R_SEQ_TRIG_EN][9];
  assign cfeb_mask_all       = cfg[R_CFEB_INJ][4:0];
  assign csc_id              = cfg[R_SEQ_ID][8:5];
  assign sync_err_en         = cfg[R_TMB_TRIG][1:0];
  assign allow_alct          = cfg[R_TMB_TRIG][2];
  assign allow_clct          = cfg[R_TMB_TRIG][3];
  assign allow_match         = cfg[R_TMB_TRIG][4];
  assign mpc_delay           = cfg[R_TMB_TRIG][8:5];
  assign alct_delay          = cfg[R_TMBTIM][3:0];
  assign clct_width          = cfg[R_TMBTIM][7:4];
  assign lhc_cycle           = cfg[R_LHC_CYCLE][11:0];
  assign bxn_offset          = cfg[R_SEQ_OFFSET][15:4];
  assign vme_cmd_enable      = cfg[R_CCB_CMD][0];
  assign vme_cmd             = cfg[R_CCB_CMD][15:8];

  // ---------------- JTAG chain select ----------------
  jtag_chain_mux #(.NCHAIN(NJTAG)) u_jtag (
    .boot_en(boot_jtag[7]), .boot_sel(boot_jtag[6:3]),
    .boot_tck(boot_jtag[2]), .boot_tms(boot_jtag[1]), .boot_tdi(boot_jtag[0]),
    .usr_sel(cfg[R_USR_JTAG][6:3]), .usr_tck(cfg[R_USR_JTAG][2]),
    .usr_tms(cfg[R_USR_JTAG][1]), .usr_tdi(cfg[R_USR_JTAG][0]),
    .chain_tck(jtag_tck), .chain_tms(jtag_tms), .chain_tdi(jtag_tdi),
    .chain_tdo(jtag_tdo), .tdo(boot_tdo)
  );

  // ---------------- TTC commands and bunch counter ----------------
  logic ttc_bx0, ttc_l1_reset, ttc_start, ttc_stop, ttc_bxreset;

  ttc_decoder u_ttc (
    .clk, .rst, .ccb_cmd, .ccb_cmd_strobe,
    .vme_cmd_enable, .vme_cmd,
    .vme_cmd_strobe(wr_pulse[R_CCB_CMD] && cfg[R_CCB_CMD][1]),
    .bx0(ttc_bx0), .l1_reset(ttc_l1_reset), .start_trig(ttc_start),
    .stop_trig(ttc_stop), .mpc_inject(mpc_inject), .bxreset(ttc_bxreset));

  always_ff @(posedge clk) begin
    if (rst)            run_enable <= 1'b1;
    else if (ttc_stop)  run_enable <= 1'b0;
    else if (ttc_start) run_enable <= 1'b1;
  end

  logic bx0_local;
  bxn_counter u_bxn (
    .clk, .rst, .lhc_cycle, .bxn_offset, .bcnt_reset(ttc_bxreset),
    .ccb_bx0(ttc_bx0), .resync(ttc_l1_reset),
    .bxn(bxn), .bx0_local(bx0_local), .sync_err(sync_err));

  // ---------------- CFEB pattern injector ----------------
  logic [NLAYER*NTRIAD-1:0] inj_triad [NCFEB];
  logic [15:0]              inj_rdata;
  logic [NCFEB-1:0]         inj_mask;
  assign inj_mask = cfg[R_CFEB_INJ][14:10];

  cfeb_injector u_inj (
    .clk, .rst,
    .febsel(cfg[R_CFEB_INJ][9:5]),
    .wen(cfg[R_CFEB_INJ_ADR][2:0]), .ren(cfg[R_CFEB_INJ_ADR][5:3]),
    .rwadr(cfg[R_CFEB_INJ_ADR][13:6]), .wdata(cfg[R_CFEB_INJ_WDATA]),
    .rdata(inj_rdata), .start(cfg[R_CFEB_INJ][15]),
    .active(cfeb_inj_active), .triad(inj_triad));

  // ---------------- CFEB receivers and triad decoders ----------------
  logic [NHS-1:0] hs_img [NLAYER];

  for (genvar c = 0; c < NCFEB; c++) begin : g_cfeb
    logic [47:0]                  pin_bits;     // {second halves, first halves}
    logic [47:0]                  triad_bits;   // layer-major: layer*8 + di-strip
    logic [NLAYER*NTRIAD-1:0]     hcm;
    logic [NLAYER*NTRIAD*4-1:0]   hs;

    ddr_demux #(.NPIN(24)) u_rx (.clk(clk), .din(cfeb_rx[c]), .dout(pin_bits));

    // Cable pin map to layer-major triad bits.
    for (genvar p = 0; p < 24; p++) begin : g_pin
      localparam cfeb_pin_t M = CFEB_PIN_MAP[p];
      assign triad_bits[int'(M.ly_first)  * NTRIAD + int'(M.tr)] = pin_bits[p];
      assign triad_bits[int'(M.ly_second) * NTRIAD + int'(M.tr)] = pin_bits[24 + p];
    end

    // Hot channel masks: three words per CFEB, two layers per word.
    for (genvar l = 0; l < NLAYER; l++) begin : g_hcm
      assign hcm[l*NTRIAD +: NTRIAD] =
        cfg[R_HCM001 + c*3 + l/2][(l%2)*8 +: 8];
    end

    // While the injector plays, it replaces the cable of the CFEBs in its mask.
    logic [47:0] triad_in;
    assign triad_in = (cfeb_inj_active && inj_mask[c]) ? inj_triad[c] : triad_bits;

    triad_decoder u_triad (
      .clk, .rst, .triad(triad_in), .hcm(hcm), .cfeb_en(cfeb_mask_all[c]),
      .triad_persist(triad_persist), .hs(hs));

    for (genvar l = 0; l < NLAYER; l++) begin : g_img
      assign hs_img[l][c*NHS_CFEB +: NHS_CFEB] = hs[l*NHS_CFEB +: NHS_CFEB];
    end
  end

  // ---------------- CLCT finder ----------------
  clct_t      seq_clct0, seq_clct1;
  logic [2:0] clct_sm;

  clct_sequencer u_seq (
    .clk, .rst, .hs(hs_img), .hs_thresh, .nph_pattern, .drift_delay,
    .flush_delay, .valid_clct_required, .all_cfebs_active,
    .trig_en(run_enable && clct_pat_trig_en),
    .bxn(bxn[1:0]), .sync_err(sync_err), .bx0_local(bx0_local),
    .pretrig(pretrig), .active_feb(active_feb), .clct_latch(clct_latch),
    .clct0(seq_clct0), .clct1(seq_clct1), .invp(invp), .clct_sm(clct_sm));

  // ---------------- ALCT*CLCT match, LCT build ----------------
  alct_t m_alct0, m_alct1;
  clct_t m_clct0, m_clct1;
  logic [3:0] match_win;

  alct_clct_match u_match (
    .clk, .rst, .alct0_in(alct0_rx), .alct1_in(alct1_rx),
    .clct_latch(clct_latch), .clct0_in(seq_clct0), .clct1_in(seq_clct1),
    .alct_delay, .clct_width, .allow_match, .allow_clct, .allow_alct,
    .trig(tmb_trig), .match(tmb_match), .alct_only(tmb_alct_only),
    .clct_only(tmb_clct_only), .match_win(match_win),
    .alct0(m_alct0), .alct1(m_alct1), .clct0(m_clct0), .clct1(m_clct1));

  alct_t l_alct0, l_alct1;
  clct_t l_clct0, l_clct1;
  logic  first_vpf, second_vpf;

  lct_duplicate u_dup (
    .alct0_in(m_alct0), .alct1_in(m_alct1), .clct0_in(m_clct0), .clct1_in(m_clct1),
    .alct0(l_alct0), .alct1(l_alct1), .clct0(l_clct0), .clct1(l_clct1),
    .first_vpf(first_vpf), .second_vpf(second_vpf));

  logic [3:0] quality0, quality1;

  lct_quality u_q (
    .match(tmb_match), .clct_only(tmb_clct_only), .alct_only(tmb_alct_only),
    .alct_q0(l_alct0.quality), .alct_q1(l_alct1.quality),
    .alct_amu0(l_alct0.amu), .alct_amu1(l_alct1.amu),
    .clct_nhit0(l_clct0.nhit), .clct_nhit1(l_clct1.nhit),
    .clct_hsds0(l_clct0.hsds), .clct_hsds1(l_clct1.hsds),
    .quality0(quality0), .quality1(quality1));

  mpc_frame0_t lct0_f0, lct1_f0;
  mpc_frame1_t lct0_f1, lct1_f1;

  // MPC test-pattern injector.
  logic [15:0] mpc_inj_f [4];
  logic [15:0] mpc_inj_rdata;
  logic [1:0]  mpc_inj_acc;

  mpc_injector u_mpc_inj (
    .clk, .rst,
    .wen(cfg[R_MPC_RAM_ADR][3:0]), .ren(cfg[R_MPC_RAM_ADR][7:4]),
    .adr(cfg[R_MPC_RAM_ADR][15:8]), .wdata(cfg[R_MPC_RAM_WDATA]),
    .rdata(mpc_inj_rdata), .acc_rdata(mpc_inj_acc),
    .nframes(cfg[R_MPC_INJ][7:0]), .vme_start(cfg[R_MPC_INJ][8]),
    .ttc_start(mpc_inject), .ttc_en(cfg[R_MPC_INJ][9]),
    .inj_send(mpc_inj_send), .inj_f(mpc_inj_f),
    .accept_latched(mpc_accept_latched), .accept(mpc_accept));

  mpc_tx u_mpc (
    .clk, .rst, .send(tmb_trig), .inj_send(mpc_inj_send), .inj_f(mpc_inj_f), .first_vpf, .second_vpf,
    .alct0(l_alct0), .alct1(l_alct1), .clct0(l_clct0), .clct1(l_clct1),
    .quality0, .quality1, .csc_id, .sync_err_en, .mpc_delay,
    .mpc_tx_pins, .mpc_accept_pin,
    .lct0_f0, .lct0_f1, .lct1_f0, .lct1_f1,
    .mpc_accept, .accept_latched(mpc_accept_latched));

  // ---------------- embedded logic analyser ----------------
  // Channels follow the board's scope channel list where this design has
  // the signal; channels of parts not built here (buffers, L1A, DMB, RPC,
  // external triggers) read 0.
  logic [127:0] scp_ch;
  logic [15:0]  scp_rdata;
  logic         scp_waiting, scp_trig_done;
  always_comb begin
    scp_ch = '0;
    scp_ch[0]      = pretrig;
    scp_ch[1]      = pretrig && (active_feb != '0);
    scp_ch[18:16]  = seq_clct0.nhit;
    scp_ch[19]     = seq_clct0.hsds;
    scp_ch[22:20]  = seq_clct1.nhit;
    scp_ch[23]     = seq_clct1.hsds;
    scp_ch[24]     = clct_latch;
    scp_ch[25]     = clct_latch && seq_clct1.vpf;
    scp_ch[26]     = alct0_rx.vpf;
    scp_ch[27]     = alct1_rx.vpf;
    scp_ch[28]     = tmb_trig && l_alct0.vpf;
    scp_ch[29]     = tmb_trig && l_clct0.vpf;
    scp_ch[32]     = pretrig;
    scp_ch[33]     = tmb_trig || mpc_inj_send;
    scp_ch[34]     = mpc_accept_latched;
    scp_ch[36:35]  = mpc_accept;
    scp_ch[43:41]  = hs_thresh;
    scp_ch[48]     = pretrig;
    scp_ch[49]     = valid_clct_required;
    scp_ch[64]     = pretrig;
    scp_ch[76:65]  = bxn;
  end

  scope u_scope (
    .clk, .rst, .ch(scp_ch),
    .runstop(cfg[R_SCP_CTRL][0]), .force_trig(cfg[R_SCP_CTRL][1]),
    .ram_sel(cfg[R_SCP_CTRL][4:2]), .radr(cfg[R_SCP_CTRL][15:8]),
    .rdata(scp_rdata), .waiting(scp_waiting), .trig_done(scp_trig_done));

  // ---------------- status read-back ----------------
  // The latched ALCT pair is the last pair received with a valid flag.
  alct_t alct0_rcd, alct1_rcd;
  always_ff @(posedge clk) begin
    if (rst) begin
      alct0_rcd <= '0;
      alct1_rcd <= '0;
    end else if (alct0_rx.vpf) begin
      alct0_rcd <= alct0_rx;
      alct1_rcd <= alct1_rx;
    end
  end

  logic [7:0] ccb_cmd_last;
  always_ff @(posedge clk) begin
    if (rst)                 ccb_cmd_last <= '0;
    else if (ccb_cmd_strobe) ccb_cmd_last <= ccb_cmd;
  end

  always_comb begin
    for (int i = 0; i < NREG; i++) stat[i] = '0;
    stat[R_CCB_STAT]   = {1'b0, 1'b0, 5'b0, 1'b1, ccb_cmd_last};
    stat[R_ALCT0_RCD]  = {3'b000, alct0_rcd};
    stat[R_ALCT1_RCD]  = {3'b000, alct1_rcd};
    stat[R_SEQ_CLCT0]  = seq_clct0[15:0];
    stat[R_SEQ_CLCT1]  = seq_clct1[15:0];
    stat[R_SEQCLCTM]   = {6'b0, seq_clct1[20:16], seq_clct0[20:16]};
    stat[R_TMB_TRIG]   = {5'b0, mpc_accept, 9'b0};
    stat[R_MPC0_F0]    = lct0_f0;
    stat[R_MPC0_F1]    = lct0_f1;
    stat[R_MPC1_F0]    = lct1_f0;
    stat[R_MPC1_F1]    = lct1_f1;
    stat[R_CFEB_INJ_RDATA] = inj_rdata;
    stat[R_USR_JTAG]       = {boot_tdo, 8'b0, cfg[R_USR_JTAG][6:0]};
    stat[R_SCP_CTRL]       = {8'b0, scp_trig_done, scp_waiting, 6'b0};
    stat[R_SCP_RDATA]      = scp_rdata;
    stat[R_MPC_INJ]        = {4'b0, mpc_inj_acc, 10'b0};
    stat[R_MPC_RAM_RDATA]  = mpc_inj_rdata;
    stat[R_SEQSM]      = {10'b0, (match_win > 4'd7) ? 3'd7 : match_win[2:0], clct_sm};
  end

endmodule
