// alct_clct_match: time coincidence of anode (ALCT) and cathode (CLCT) LCTs.
//
// The ALCT muon pair is delayed by alct_delay clocks (0..15) so that it
// lines up with the CLCT, which arrives later because of the cathode drift
// delay.  A latched CLCT whose first muon is valid opens a match window of
// clct_width clocks (a width of 0 acts as 1), starting with the clock the
// CLCT arrives.  The first clock in the window that sees a valid delayed
// ALCT gives a match; match_win reports its position in the window.  If the
// window closes without an ALCT the event is CLCT-only.  A valid delayed
// ALCT seen while no window is open is ALCT-only.
// The result is reported with a one-clock trig pulse, provided the type is
// allowed (allow_match, allow_clct, allow_alct bits of the TMB trigger
// register); the muon words travel with it.
// The register fields are the document's; the window rule is this design's
// reading of "delay ALCT for CLCT match window" and "CLCT match window
// width".
module alct_clct_match
  import tmb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  alct_t      alct0_in,
  input  alct_t      alct1_in,
  input  logic       clct_latch,
  input  clct_t      clct0_in,
  input  clct_t      clct1_in,
  input  logic [3:0] alct_delay,
  input  logic [3:0] clct_width,
  input  logic       allow_match,
  input  logic       allow_clct,
  input  logic       allow_alct,
  output logic       trig,
  output logic       match,
  output logic       alct_only,
  output logic       clct_only,
  output logic [3:0] match_win,
  output alct_t      alct0,
  output alct_t      alct1,
  output clct_t      clct0,
  output clct_t      clct1
);

  // ALCT delay line: dly[i] is the ALCT pair i clocks old (dly[0] = now).
  alct_t a0_dly [16];
  alct_t a1_dly [16];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < 16; i++) begin a0_dly[i] <= '0; a1_dly[i] <= '0; end
    end else begin
      for (int i = 1; i < 16; i++) begin a0_dly[i] <= a0_dly[i-1]; a1_dly[i] <= a1_dly[i-1]; end
    end
  end
  assign a0_dly[0] = alct0_in;
  assign a1_dly[0] = alct1_in;

  alct_t a0d, a1d;
  assign a0d = a0_dly[alct_delay];
  assign a1d = a1_dly[alct_delay];

  logic       open_q;
  logic [3:0] pos_q;
  clct_t      c0_q, c1_q;
  logic [3:0] width;
  assign width = (clct_width == '0) ? 4'd1 : clct_width;

  always_ff @(posedge clk) begin
    if (rst) begin
      open_q <= 1'b0;
      pos_q  <= '0;
      c0_q   <= '0;
      c1_q   <= '0;
      {trig, match, alct_only, clct_only} <= '0;
      match_win <= '0;
      alct0 <= '0; alct1 <= '0; clct0 <= '0; clct1 <= '0;
    end else begin
      trig <= 1'b0;
      if (open_q || (clct_latch && clct0_in.vpf)) begin
        clct_t      c0, c1;
        logic [3:0] pos;
        c0  = open_q ? c0_q  : clct0_in;
        c1  = open_q ? c1_q  : clct1_in;
        pos = open_q ? pos_q : 4'd0;
        if (a0d.vpf) begin
          trig      <= allow_match;
          {match, alct_only, clct_only} <= 3'b100;
          match_win <= pos;
          alct0 <= a0d;  alct1 <= a1d;  clct0 <= c0;  clct1 <= c1;
          open_q    <= 1'b0;
        end else if (pos + 4'd1 >= width) begin
          trig      <= allow_clct;
          {match, alct_only, clct_only} <= 3'b001;
          match_win <= pos;
          alct0 <= '0;  alct1 <= '0;  clct0 <= c0;  clct1 <= c1;
          open_q    <= 1'b0;
        end else begin
          c0_q   <= c0;
          c1_q   <= c1;
          pos_q  <= pos + 4'd1;
          open_q <= 1'b1;
        end
      end else if (a0d.vpf) begin
        trig      <= allow_alct;
        {match, alct_only, clct_only} <= 3'b010;
        match_win <= '0;
        alct0 <= a0d;  alct1 <= a1d;  clct0 <= '0;  clct1 <= '0;
      end
    end
  end

endmodule
