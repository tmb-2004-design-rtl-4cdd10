// scope: embedded logic analyser of the TMB.
//
// NCH probe channels (8 banks of 16) are recorded for NTBIN clocks into a
// RAM, one word of NCH bits per clock, and read back over VME one 16-bit
// bank at a time.  Channel 0 is the trigger (the sequencer pre-trigger in
// the board's channel list).
// Control (register 98): runstop=1 arms the scope: it raises waiting and
// waits for channel 0 or a rising edge of force_trig.  The clock of the
// trigger is stored at address 0 and the following NTBIN-1 clocks after
// it; then waiting drops and trig_done rises.  runstop=0 clears both and
// stops the scope; setting it again re-arms (a new rising edge is needed).
// Read-back: rdata is bank ram_sel of the word at radr, registered.
// Timing: if the trigger is seen at clock edge E, the word sampled at E is
// address 0 and trig_done is high after edge E+NTBIN-1.
// The channel count, the 8-bit read address, the bank select and the
// control/status bits follow the register map; recording from the trigger
// on (no pre-trigger history) and the arming rules are this design's
// choices, and the DMB insertion mode (scp_auto) is not built.
module scope #(
  parameter int unsigned NCH   = 128,
  parameter int unsigned NTBIN = 256
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [NCH-1:0] ch,
  input  logic           runstop,
  input  logic           force_trig,
  input  logic [2:0]     ram_sel,
  input  logic [$clog2(NTBIN)-1:0] radr,
  output logic [15:0]    rdata,
  output logic           waiting,
  output logic           trig_done
);

  localparam int unsigned AW = $clog2(NTBIN);
  localparam int unsigned NBANK = NCH / 16;

  logic [NCH-1:0] ram [NTBIN];
  logic           runstop_q, force_q, recording;
  logic [AW-1:0]  wadr;
  logic           trig;

  assign trig = waiting && (ch[0] || (force_trig && !force_q));

  always_ff @(posedge clk) begin
    if (rst) begin
      runstop_q <= 1'b0;
      force_q   <= 1'b0;
      waiting   <= 1'b0;
      recording <= 1'b0;
      trig_done <= 1'b0;
      wadr      <= '0;
    end else begin
      runstop_q <= runstop;
      force_q   <= force_trig;
      if (!runstop) begin
        waiting   <= 1'b0;
        recording <= 1'b0;
        trig_done <= 1'b0;
      end else if (!runstop_q) begin
        waiting   <= 1'b1;            // armed
        trig_done <= 1'b0;
      end else if (trig) begin
        waiting   <= 1'b0;
        recording <= 1'b1;
        ram[0]    <= ch;
        wadr      <= AW'(1);
      end else if (recording) begin
        ram[wadr] <= ch;
        wadr      <= wadr + 1'b1;
        if (wadr == AW'(NTBIN - 1)) begin
          recording <= 1'b0;
          trig_done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    logic [NCH-1:0] w;
    w = ram[radr];
    rdata <= '0;
    for (int b = 0; b < NBANK; b++)
      if (ram_sel == 3'(b)) rdata <= w[b*16 +: 16];
  end

endmodule
