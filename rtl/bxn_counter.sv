// bxn_counter: LHC bunch-crossing counter of the TMB.
//
// The 12-bit counter advances once per 40 MHz clock and wraps from
// lhc_cycle-1 to 0 (lhc_cycle defaults to 3564, the LHC orbit; 924 for beam
// tests).  A counter reset (ccb_bcntres or the tmb_bxreset TTC command)
// loads bxn_offset, so the counter can be aligned with the machine.
// bx0_local is high while the counter is zero.  sync_err is set when a BX0
// from the CCB arrives while the local counter is not zero ("BXN does not
// match at BX0") and is held until an L1 reset / resync clears it.
// Loading the offset on reset and making sync_err sticky are choices of
// this design; the register fields and their meaning follow the register
// map.
module bxn_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] lhc_cycle,
  input  logic [11:0] bxn_offset,
  input  logic        bcnt_reset,
  input  logic        ccb_bx0,
  input  logic        resync,
  output logic [11:0] bxn,
  output logic        bx0_local,
  output logic        sync_err
);

  always_ff @(posedge clk) begin
    if (rst) begin
      bxn      <= '0;
      sync_err <= 1'b0;
    end else begin
      if (bcnt_reset)
        bxn <= bxn_offset;
      else if (bxn >= lhc_cycle - 12'd1)
        bxn <= '0;
      else
        bxn <= bxn + 12'd1;

      if (resync)
        sync_err <= 1'b0;
      else if (ccb_bx0 && bxn != '0 && !bcnt_reset)
        sync_err <= 1'b1;
    end
  end

  assign bx0_local = (bxn == '0);

endmodule
