// ttc_decoder: decodes the CCB fast-control broadcast commands the TMB uses.
//
// A command is taken from ccb_cmd[7:0] when ccb_cmd_strobe is high.  The
// codes acted on are BX0 (01h), L1 reset / resynchronise (03h), start
// trigger (06h), stop trigger (07h), inject MPC patterns from the TMB (24h)
// and tmb_bxreset (32h, reset the bunch counter but not the L1A counters);
// each produces a one-clock pulse on the clock after the strobe.  When
// vme_cmd_enable is set the backplane command bus is ignored and the
// command comes from the VME command-generator register instead
// (vme_cmd / vme_cmd_strobe), as in the TTC command-generator register.
// The command codes are the document's; registering the decode by one
// clock is this design's choice.
module ttc_decoder
  import tmb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] ccb_cmd,
  input  logic       ccb_cmd_strobe,
  input  logic       vme_cmd_enable,
  input  logic [7:0] vme_cmd,
  input  logic       vme_cmd_strobe,
  output logic       bx0,
  output logic       l1_reset,
  output logic       start_trig,
  output logic       stop_trig,
  output logic       mpc_inject,
  output logic       bxreset
);

  logic [7:0] cmd;
  logic       strobe;
  assign cmd    = vme_cmd_enable ? vme_cmd : ccb_cmd;
  assign strobe = vme_cmd_enable ? vme_cmd_strobe : ccb_cmd_strobe;

  always_ff @(posedge clk) begin
    if (rst) begin
      {bx0, l1_reset, start_trig, stop_trig, mpc_inject, bxreset} <= '0;
    end else begin
      bx0        <= strobe && (cmd == TTC_BX0);
      l1_reset   <= strobe && (cmd == TTC_L1_RESET);
      start_trig <= strobe && (cmd == TTC_START_TRIG);
      stop_trig  <= strobe && (cmd == TTC_STOP_TRIG);
      mpc_inject <= strobe && (cmd == TTC_MPC_INJECT);
      bxreset    <= strobe && (cmd == TTC_BXRESET);
    end
  end

endmodule
