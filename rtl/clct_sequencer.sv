// clct_sequencer: cathode LCT finder and its trigger state machine.
//
// The half-strip image of all CFEBs (NLAYER x NCF*32 half-strips) is fed to
// one pattern_unit per key half-strip and the results to best2_clct, every
// clock.  The state machine (clct_sm, as read back in the sequencer state
// register) then works as follows:
//   IDLE   pre-trigger when any key's envelope count reaches hs_thresh
//          (and CLCT pattern triggers are enabled); record which CFEBs
//          hold such keys as the active-FEB list for the DMB (all CFEBs if
//          all_cfebs_active).
//   DRIFT  wait drift_delay clocks so that late drift-time hits arrive.
//          With drift_delay=0 the CLCTs are latched at the pre-trigger.
//   latch  store the best and second-best pattern in the 21-bit CLCT
//          format; a CLCT is valid when its layer count reaches
//          nph_pattern.  If the first CLCT is not valid and
//          valid_clct_required is set, invp flags an invalid pattern.
//   FLUSH  hold for flush_delay clocks and until no key is above the
//          pre-trigger threshold, then go back to IDLE.
// Timing: hits sampled at clock edge T pre-trigger at T (pretrig pulses in
// the following cycle); the CLCTs are those of the hits sampled at edge
// T+drift_delay and clct_latch pulses in the cycle after that edge.
// The register fields and the CLCT bit layout are the document's; the
// state sequence, the flush rule and the active-FEB rule are this design's.
module clct_sequencer
  import tmb_pkg::*;
#(
  parameter int unsigned NCF     = NCFEB,
  parameter int unsigned BUSY_HW = 2,
  localparam int unsigned NKEY   = NCF * NHS_CFEB,
  localparam int unsigned KW     = $clog2(NKEY)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NKEY-1:0] hs [NLAYER],
  input  logic [2:0]      hs_thresh,
  input  logic [2:0]      nph_pattern,
  input  logic [1:0]      drift_delay,
  input  logic [3:0]      flush_delay,
  input  logic            valid_clct_required,
  input  logic            all_cfebs_active,
  input  logic            trig_en,
  input  logic [1:0]      bxn,
  input  logic            sync_err,
  input  logic            bx0_local,
  output logic            pretrig,
  output logic [NCF-1:0]  active_feb,
  output logic            clct_latch,
  output clct_t           clct0,
  output clct_t           clct1,
  output logic            invp,
  output logic [2:0]      clct_sm
);

  typedef enum logic [2:0] {S_IDLE = 3'd0, S_DRIFT = 3'd1, S_FLUSH = 3'd2} sm_e;

  // Pattern look-up at every key.
  logic [2:0] env  [NKEY];
  logic [2:0] kpat [NKEY];
  logic [2:0] knh  [NKEY];

  for (genvar k = 0; k < NKEY; k++) begin : g_key
    logic [3:0] win [NLAYER];
    for (genvar l = 0; l < NLAYER; l++) begin : g_ly
      for (genvar i = 0; i < 4; i++) begin : g_b
        localparam int HS = k - 1 + i;
        if (HS >= 0 && HS < NKEY) begin : g_in
          assign win[l][i] = hs[l][HS];
        end else begin : g_edge
          assign win[l][i] = 1'b0;
        end
      end
    end
    pattern_unit u_pat (.win(win), .env_nhit(env[k]), .pat(kpat[k]), .nhit(knh[k]));
  end

  logic          f0, f1;
  logic [KW-1:0] k0, k1;
  logic [2:0]    p0, p1, n0, n1;

  best2_clct #(.NKEY(NKEY), .BUSY_HW(BUSY_HW)) u_best2 (
    .pat(kpat), .nhit(knh),
    .found0(f0), .key0(k0), .pat0(p0), .nhit0(n0),
    .found1(f1), .key1(k1), .pat1(p1), .nhit1(n1));

  // Keys above the pre-trigger threshold, per CFEB.
  logic [NCF-1:0] feb_above;
  logic           above;
  always_comb begin
    feb_above = '0;
    for (int k = 0; k < NKEY; k++)
      if (env[k] >= hs_thresh && hs_thresh != '0) feb_above[k / NHS_CFEB] = 1'b1;
  end
  assign above = |feb_above;

  function automatic clct_t make_clct(input logic found, input logic [KW-1:0] key,
      input logic [2:0] p, input logic [2:0] n, input logic [2:0] nph,
      input logic [1:0] b, input logic se, input logic b0);
    clct_t c;
    c.vpf       = found && (n >= nph);
    c.nhit      = n;
    c.pat       = p;
    c.hsds      = 1'b1;
    c.bend      = p[0];
    c.key       = 5'(key % NHS_CFEB);
    c.cfeb      = 3'(key / NHS_CFEB);
    c.bxn       = b;
    c.sync_err  = se;
    c.bx0_local = b0;
    return c;
  endfunction

  sm_e        st;
  logic [3:0] cnt;
  logic       do_latch;
  assign clct_sm = st;

  always_comb begin
    do_latch = 1'b0;
    if (st == S_IDLE && trig_en && above && drift_delay == 2'd0) do_latch = 1'b1;
    if (st == S_DRIFT && cnt == '0) do_latch = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_IDLE;
      cnt        <= '0;
      pretrig    <= 1'b0;
      active_feb <= '0;
      clct_latch <= 1'b0;
      invp       <= 1'b0;
      clct0      <= '0;
      clct1      <= '0;
    end else begin
      pretrig    <= 1'b0;
      clct_latch <= 1'b0;
      invp       <= 1'b0;
      case (st)
        S_IDLE: if (trig_en && above) begin
          pretrig    <= 1'b1;
          active_feb <= all_cfebs_active ? '1 : feb_above;
          cnt        <= 4'(drift_delay) - 4'd1;
          st         <= (drift_delay == 2'd0) ? S_FLUSH : S_DRIFT;
        end
        S_DRIFT: if (cnt == '0) st <= S_FLUSH;
                 else cnt <= cnt - 4'd1;
        default: if (cnt == '0) begin
                   if (!above) st <= S_IDLE;
                 end else cnt <= cnt - 4'd1;
      endcase
      if (do_latch) begin
        clct_t c0;
        c0 = make_clct(f0, k0, p0, n0, nph_pattern, bxn, sync_err, bx0_local);
        clct0      <= c0;
        clct1      <= make_clct(f1, k1, p1, n1, nph_pattern, bxn, sync_err, bx0_local);
        clct_latch <= 1'b1;
        invp       <= valid_clct_required && !c0.vpf;
        cnt        <= flush_delay;
      end
    end
  end

endmodule
