// mpc_injector: MPC test-pattern injector.
//
// Four RAMs of NTBIN 16-bit words hold ready-made MPC frames: RAM 0 and 1
// are frame 0 and frame 1 of LCT0, RAM 2 and 3 those of LCT1.  A run sends
// the pairs at addresses 0..nframes-1 to the MPC, one pair per clock,
// through the normal transmitter (mpc_tx, whose inj_send input this drives).
// The MPC answer to each injected pair is written into a fifth RAM at the
// same address, so software can read back which frames were accepted.
//
// VME side (registers 90-96): wen[3:0]/ren[3:0] pick the frame RAMs, adr
// the word.  While a wen bit is set wdata is written, every clock, to that
// RAM at adr; software sets data and address first and then pulses the
// enable.  rdata is the word at adr of the lowest read-enabled RAM and
// acc_rdata the answer stored at adr, both registered.
// Start: a rising edge on the VME inject bit, or the TTC MPC-inject command
// when ttc_en is set, starts a run unless one is in progress.  nframes=0
// sends nothing.  If the start is seen at clock edge E, inj_send is high
// after edges E+1 .. E+nframes with the frames of addresses 0.. on inj_f.
// Answers: each accept_latched pulse from the transmitter stores accept at
// the next answer address, counting from 0 at each start, so the answers
// of a run land at the addresses of the frames they belong to.
// The RAM organisation, the frame count, the TTC start and the stored
// answers follow the register map; the write-enable handling, the
// in-order answer addressing and the start rules are this design's
// choices.
module mpc_injector #(
  parameter int unsigned NTBIN = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  wen,
  input  logic [3:0]  ren,
  input  logic [$clog2(NTBIN)-1:0] adr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic [1:0]  acc_rdata,
  input  logic [7:0]  nframes,
  input  logic        vme_start,
  input  logic        ttc_start,
  input  logic        ttc_en,
  output logic        inj_send,
  output logic [15:0] inj_f [4],
  input  logic        accept_latched,
  input  logic [1:0]  accept
);

  localparam int unsigned AW = $clog2(NTBIN);

  logic [15:0] ram [4][NTBIN];
  logic [1:0]  acc_ram [NTBIN];

  always_ff @(posedge clk) begin
    for (int r = 0; r < 4; r++)
      if (wen[r]) ram[r][adr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= '0;
    for (int r = 3; r >= 0; r--)
      if (ren[r]) rdata <= ram[r][adr];
    acc_rdata <= acc_ram[adr];
  end

  // Run control.
  logic          vme_start_q, run;
  logic [7:0]    cnt;       // frames sent so far in this run
  logic [AW-1:0] acc_adr;
  logic          go;
  assign go = (vme_start && !vme_start_q) || (ttc_start && ttc_en);

  always_ff @(posedge clk) begin
    if (rst) begin
      vme_start_q <= 1'b0;
      run         <= 1'b0;
      cnt         <= '0;
      acc_adr     <= '0;
      inj_send    <= 1'b0;
    end else begin
      vme_start_q <= vme_start;
      inj_send    <= 1'b0;
      if (!run && go) begin
        run     <= (nframes != '0);
        cnt     <= '0;
        acc_adr <= '0;
      end else if (run) begin
        inj_send <= 1'b1;
        for (int r = 0; r < 4; r++) inj_f[r] <= ram[r][AW'(cnt)];
        cnt <= cnt + 8'd1;
        if (cnt + 8'd1 == nframes || 32'(cnt) + 1 == NTBIN) run <= 1'b0;
      end
      if (accept_latched) begin
        acc_ram[acc_adr] <= accept;
        acc_adr <= acc_adr + 1'b1;
      end
    end
  end

endmodule
