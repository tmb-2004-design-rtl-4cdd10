// mpc_tx: sends the TMB's two LCTs to the muon port card (MPC).
//
// Each LCT is described by two 16-bit frames (layout in tmb_pkg):
//   frame 0: valid flag, 4-bit quality, CLCT half-strip flag and pattern,
//            ALCT key wire group;
//   frame 1: CSC id, BXN=0 flag, ALCT bxn[0], sync error, CLCT bend and
//            8-bit key half-strip (CFEB*32 + key).
// The 32 output pins run at 80 MHz: in the first half of the 25 ns
// crossing they carry frame 0 of both LCTs ({LCT1, LCT0}), in the second
// half frame 1.  The pins are zero when no LCT is sent.  The frames of the
// last LCT pair sent are held for read-back over VME.
// The MPC answers on one 80 MHz pin (LCT0 accept first, LCT1 accept
// second).  mpc_delay clocks after each pair was sent (a 16-stage shift
// register remembers the send times, so pairs sent on successive clocks
// each get their answer; changing mpc_delay while answers are pending may
// drop them) the demultiplexed answer is latched into
// mpc_accept and accept_latched pulses; the input capture takes two clocks, so the
// answer must be on the pin two clocks before that (mpc_delay >= 2).
// A sync error is only sent for an LCT whose sync_err_en bit is set.
// inj_send sends the four frames inj_f unchanged (MPC test injector) and
// takes priority over send.
// Timing: send is sampled at a rising edge; the frames appear on the pins
// for the following crossing.  The output multiplexer switches on the clock
// level, the way a double-data-rate output cell does; for an FPGA or ASIC it
// maps onto a DDR output register.
// The frame layouts, the 2:1 multiplexing and the accept delay are the
// document's; the pin order within a half-crossing is this design's choice.
// The ALCT/CLCT words are taken whole; the fields the frames do not carry
// (valid flags, ALCT quality and amu, CLCT layer count and 2-bit bxn) are
// left unused here on purpose, which lint reports as unused bits.
module mpc_tx
  import tmb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        send,
  input  logic        inj_send,      // send inj_f instead (test injector)
  input  logic [15:0] inj_f [4],     // lct0 f0, lct0 f1, lct1 f0, lct1 f1
  input  logic        first_vpf,
  input  logic        second_vpf,
  input  alct_t       alct0,
  input  alct_t       alct1,
  input  clct_t       clct0,
  input  clct_t       clct1,
  input  logic [3:0]  quality0,
  input  logic [3:0]  quality1,
  input  logic [3:0]  csc_id,
  input  logic [1:0]  sync_err_en,
  input  logic [3:0]  mpc_delay,
  output logic [31:0] mpc_tx_pins,
  input  logic        mpc_accept_pin,
  output mpc_frame0_t lct0_f0,
  output mpc_frame1_t lct0_f1,
  output mpc_frame0_t lct1_f0,
  output mpc_frame1_t lct1_f1,
  output logic [1:0]  mpc_accept,
  output logic        accept_latched
);

  function automatic mpc_frame0_t f0(input logic vpf, input logic [3:0] q,
      input logic [6:0] akey, input logic hsds, input logic [2:0] pat);
    mpc_frame0_t f;
    f.vpf       = vpf;
    f.quality   = q;
    f.clct_hsds = hsds;
    f.clct_pat  = pat;
    f.alct_key  = akey;
    return f;
  endfunction

  function automatic mpc_frame1_t f1(input logic [3:0] id, input logic abxn0,
      input logic bx0, input logic serr, input logic bend,
      input logic [2:0] cfeb, input logic [4:0] key);
    mpc_frame1_t f;
    f.csc_id    = id;
    f.bx0_local = bx0;
    f.alct_bxn0 = abxn0;
    f.sync_err  = serr;
    f.clct_bend = bend;
    f.clct_key  = 8'(cfeb) * 8'd32 + 8'(key);
    return f;
  endfunction

  logic [31:0] w0_q, w1_q;   // pins of the first and second half-crossing
  logic [15:0] sent_sr;      // sent_sr[i]: an LCT pair was sent i+1 clocks ago
  logic [1:0]  acc_pair;

  ddr_demux #(.NPIN(1)) u_acc (.clk(clk), .din(mpc_accept_pin), .dout(acc_pair));

  always_ff @(posedge clk) begin
    if (rst) begin
      w0_q <= '0;  w1_q <= '0;
      lct0_f0 <= '0; lct0_f1 <= '0; lct1_f0 <= '0; lct1_f1 <= '0;
      sent_sr <= '0;
      mpc_accept <= '0; accept_latched <= 1'b0;
    end else begin
      // Shift the send times; a time older than mpc_delay has had its
      // answer and is dropped.
      sent_sr[0] <= send || inj_send;
      for (int i = 1; i < 16; i++)
        sent_sr[i] <= (4'(i) <= mpc_delay) ? sent_sr[i-1] : 1'b0;
      // Every pair sent gets its answer mpc_delay clocks later.
      accept_latched <= sent_sr[mpc_delay];
      if (sent_sr[mpc_delay]) mpc_accept <= acc_pair;
      if (inj_send) begin
        w0_q <= {inj_f[2], inj_f[0]};
        w1_q <= {inj_f[3], inj_f[1]};
        lct0_f0 <= inj_f[0];  lct0_f1 <= inj_f[1];
        lct1_f0 <= inj_f[2];  lct1_f1 <= inj_f[3];
      end else if (send) begin
        mpc_frame0_t a0, b0;
        mpc_frame1_t a1, b1;
        a0 = f0(first_vpf,  quality0, alct0.key, clct0.hsds, clct0.pat);
        b0 = f0(second_vpf, quality1, alct1.key, clct1.hsds, clct1.pat);
        a1 = f1(csc_id, alct0.bxn[0], clct0.bx0_local, clct0.sync_err && sync_err_en[0],
                clct0.bend, clct0.cfeb, clct0.key);
        b1 = f1(csc_id, alct1.bxn[0], clct1.bx0_local, clct1.sync_err && sync_err_en[1],
                clct1.bend, clct1.cfeb, clct1.key);
        w0_q <= {b0, a0};
        w1_q <= {b1, a1};
        lct0_f0 <= a0;  lct0_f1 <= a1;  lct1_f0 <= b0;  lct1_f1 <= b1;
      end else begin
        w0_q <= '0;
        w1_q <= '0;
      end
    end
  end

  assign mpc_tx_pins = clk ? w0_q : w1_q;

endmodule
