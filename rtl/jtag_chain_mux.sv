// jtag_chain_mux: routes the board's JTAG signals to one of its chains.
//
// Two sources can drive JTAG: the hardware bootstrap register (usable even
// when the FPGA is not configured) and the FPGA's user JTAG register
// (VME address 10).  boot_en (bootstrap bit 7) selects the bootstrap
// register, otherwise the user register drives.  The 4-bit chain select of
// the active source picks the chain:
//   00xx ALCT, 01xx TMB mezzanine FPGA + PROMs, 10xx TMB user PROMs,
//   1100 FPGA monitor, 1101 RAT module FPGA + PROM
// (1110 and 1111 select no chain).  The selected chain gets TCK, TMS and
// TDI; every other chain is held idle with TCK low and TMS high.  The
// selected chain's TDO is returned to both registers (tdo); with no chain
// selected tdo reads 0.
// Purely combinational: the register bits are bit-banged by software, so
// the JTAG clock is far below the board clock.
// The chain table, the select codes and the two sources follow the
// register map; the idle levels of unselected chains are this design's
// choice.
module jtag_chain_mux #(
  parameter int unsigned NCHAIN = 5
) (
  input  logic              boot_en,
  input  logic [3:0]        boot_sel,
  input  logic              boot_tck, boot_tms, boot_tdi,
  input  logic [3:0]        usr_sel,
  input  logic              usr_tck, usr_tms, usr_tdi,
  output logic [NCHAIN-1:0] chain_tck,
  output logic [NCHAIN-1:0] chain_tms,
  output logic [NCHAIN-1:0] chain_tdi,
  input  logic [NCHAIN-1:0] chain_tdo,
  output logic              tdo
);

  typedef enum logic [2:0] {
    CH_ALCT = 3'd0, CH_MEZ = 3'd1, CH_UPROM = 3'd2, CH_MON = 3'd3, CH_RAT = 3'd4,
    CH_NONE = 3'd7
  } chain_e;

  logic [3:0] sel;
  logic       tck, tms, tdi;
  chain_e     chain;

  always_comb begin
    sel = boot_en ? boot_sel : usr_sel;
    tck = boot_en ? boot_tck : usr_tck;
    tms = boot_en ? boot_tms : usr_tms;
    tdi = boot_en ? boot_tdi : usr_tdi;
    case (sel[3:2])
      2'b00:   chain = CH_ALCT;
      2'b01:   chain = CH_MEZ;
      2'b10:   chain = CH_UPROM;
      default: chain = (sel[1:0] == 2'b00) ? CH_MON :
                       (sel[1:0] == 2'b01) ? CH_RAT : CH_NONE;
    endcase
    chain_tck = '0;
    chain_tms = '1;
    chain_tdi = '0;
    tdo       = 1'b0;
    for (int i = 0; i < NCHAIN; i++)
      if (chain == chain_e'(i)) begin
        chain_tck[i] = tck;
        chain_tms[i] = tms;
        chain_tdi[i] = tdi;
        tdo          = chain_tdo[i];
      end
  end

endmodule
