// cfeb_injector: CFEB pattern injector, a test source of triad data.
//
// Each CFEB has three injector RAMs, one per layer pair (Ly0/1, Ly2/3,
// Ly4/5), with NTBIN words of 16 bits.  Word t of RAM r holds the triad
// bits of time bin t: bits [7:0] are the eight di-strips of layer 2r and
// bits [15:8] those of layer 2r+1.  So the RAMs hold the raw serial triad
// streams, one bit per di-strip per clock, and a track is loaded by
// writing the start, strip and half-strip bits into successive time bins.
//
// VME side (registers 42-48): febsel picks the CFEBs, wen/ren the RAMs
// (one bit per layer pair) and rwadr the time bin.  While a wen bit is set
// the write data is written, every clock, into that RAM of every selected
// CFEB, so software sets the data and address first and then pulses the
// enable.  rdata is the word at rwadr of the lowest selected CFEB and
// lowest read-enabled RAM, registered (one clock).
//
// Play-out: a rising edge on start begins a run through time bins
// 0..NTBIN-1, one per clock.  During the run active is high and triad[c]
// carries the word of each time bin, layer-major (bit layer*8 + di-strip)
// like a demultiplexed CFEB link, so the top can take it in place of the
// cable data of the CFEBs enabled in the injector mask.  If start is first
// seen high at clock edge E, bin 0 is on triad (with active high) after
// edge E+1 and bin t after edge E+1+t.
// The RAM organisation, the register fields and the 256-bin address range
// follow the register map; the write-enable handling, the play-out length
// (the whole RAM, once) and the start on a rising edge are this design's
// choices.
module cfeb_injector
  import tmb_pkg::*;
#(
  parameter int unsigned NCF   = NCFEB,
  parameter int unsigned NTBIN = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [NCF-1:0]   febsel,
  input  logic [2:0]       wen,
  input  logic [2:0]       ren,
  input  logic [$clog2(NTBIN)-1:0] rwadr,
  input  logic [15:0]      wdata,
  output logic [15:0]      rdata,
  input  logic             start,
  output logic             active,
  output logic [NLAYER*NTRIAD-1:0] triad [NCF]
);

  localparam int unsigned AW = $clog2(NTBIN);

  logic [15:0] ram [NCF][3][NTBIN];

  // VME write port.
  always_ff @(posedge clk) begin
    for (int c = 0; c < NCF; c++)
      for (int r = 0; r < 3; r++)
        if (febsel[c] && wen[r]) ram[c][r][rwadr] <= wdata;
  end

  // VME read port: lowest selected CFEB, lowest enabled RAM.
  always_ff @(posedge clk) begin
    logic found;
    found = 1'b0;
    for (int c = 0; c < NCF; c++)
      for (int r = 0; r < 3; r++)
        if (!found && febsel[c] && ren[r]) begin
          rdata <= ram[c][r][rwadr];
          found = 1'b1;
        end
    if (!found) rdata <= '0;
  end

  // Play-out sequencer.
  logic          start_q, run;
  logic [AW-1:0] tbin;
  always_ff @(posedge clk) begin
    if (rst) begin
      start_q <= 1'b0;
      run     <= 1'b0;
      active  <= 1'b0;
      tbin    <= '0;
    end else begin
      start_q <= start;
      active  <= run;
      if (!run && start && !start_q) begin
        run  <= 1'b1;
        tbin <= '0;
      end else if (run) begin
        if (tbin == AW'(NTBIN - 1)) run  <= 1'b0;
        else                        tbin <= tbin + 1'b1;
      end
    end
  end

  // Output word of the current time bin, aligned with active.
  always_ff @(posedge clk) begin
    for (int c = 0; c < NCF; c++)
      for (int r = 0; r < 3; r++)
        triad[c][r*16 +: 16] <= ram[c][r][tbin];
  end

endmodule
