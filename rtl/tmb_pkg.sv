// tmb_pkg: types and constants shared by the trigger motherboard (TMB) logic.
//
// The ALCT and CLCT muon words follow the bit layouts of the TMB register
// map (ALCT received-muon registers and the sequencer latched-CLCT
// registers); the MPC frame layouts follow the MPC frame registers.  The
// half-strip look-up tables are the envelope and bend-pattern tables of the
// cathode pattern finder: each table entry is a 16-bit LUT addressed by the
// four half-strips {hs3,hs2,hs1,hs0} of one layer, so 16'hCCCC means
// "half-strip 1 hit", 16'hFEFE "any of half-strips 0..2 hit".
// The register defaults and write masks below reproduce the register map's
// default column; register words not listed are read-only.
package tmb_pkg;

  localparam int unsigned NCFEB   = 5;   // cathode front-end boards
  localparam int unsigned NLAYER  = 6;   // chamber layers
  localparam int unsigned NTRIAD  = 8;   // di-strips (triads) per layer per CFEB
  localparam int unsigned NHS_CFEB = 4 * NTRIAD;        // 32 half-strips per CFEB
  localparam int unsigned NHS      = NCFEB * NHS_CFEB;  // 160 key half-strips
  localparam int unsigned NPAT     = 7;                 // bend patterns 1..7

  // ALCT muon word, 13 bits (register bits [12:0]).
  typedef struct packed {
    logic [1:0] bxn;      // [12:11]
    logic [6:0] key;      // [10:4]  key wire group
    logic       amu;      // [3]     accelerator muon
    logic [1:0] quality;  // [2:1]
    logic       vpf;      // [0]     valid pattern flag
  } alct_t;

  // Cathode LCT word, 21 bits (latched-CLCT register layout).
  typedef struct packed {
    logic       bx0_local; // [20]
    logic       sync_err;  // [19]
    logic [1:0] bxn;       // [18:17]
    logic [2:0] cfeb;      // [16:14]
    logic [4:0] key;       // [13:9]  half-strip within the CFEB
    logic       bend;      // [8]     = pattern lsb
    logic       hsds;      // [7]     1 = half-strip pattern
    logic [2:0] pat;       // [6:4]
    logic [2:0] nhit;      // [3:1]
    logic       vpf;       // [0]
  } clct_t;

  // MPC frames of one LCT (frame 0 sent first, frame 1 second).
  typedef struct packed {
    logic       vpf;          // [15]
    logic [3:0] quality;      // [14:11]
    logic       clct_hsds;    // [10]
    logic [2:0] clct_pat;     // [9:7]
    logic [6:0] alct_key;     // [6:0]
  } mpc_frame0_t;

  typedef struct packed {
    logic [3:0] csc_id;       // [15:12]
    logic       bx0_local;    // [11]
    logic       alct_bxn0;    // [10]
    logic       sync_err;     // [9]
    logic       clct_bend;    // [8]
    logic [7:0] clct_key;     // [7:0] half-strip 0..159
  } mpc_frame1_t;

  // Half-strip LUTs, index [pattern][layer]; pattern 0 is the cell envelope.
  typedef logic [15:0] lut_t;
  localparam lut_t PAT_LUT [0:NPAT][0:NLAYER-1] = '{
    '{16'hFEFE, 16'hFEFE, 16'hFEFE, 16'hCCCC, 16'hFEFE, 16'hFEFE},  // envelope
    '{16'hF0F0, 16'hF0F0, 16'hFCFC, 16'hCCCC, 16'hEEEE, 16'hAAAA},  // pattern 1
    '{16'hAAAA, 16'hAAAA, 16'hEEEE, 16'hCCCC, 16'hFCFC, 16'hF0F0},  // pattern 2
    '{16'hCCCC, 16'hCCCC, 16'hCCCC, 16'hCCCC, 16'hAAAA, 16'hAAAA},  // pattern 3
    '{16'hCCCC, 16'hCCCC, 16'hCCCC, 16'hCCCC, 16'hF0F0, 16'hF0F0},  // pattern 4
    '{16'hF0F0, 16'hF0F0, 16'hFCFC, 16'hCCCC, 16'hCCCC, 16'hCCCC},  // pattern 5
    '{16'hAAAA, 16'hAAAA, 16'hEEEE, 16'hCCCC, 16'hCCCC, 16'hCCCC},  // pattern 6
    '{16'hCCCC, 16'hCCCC, 16'hCCCC, 16'hCCCC, 16'hCCCC, 16'hCCCC}   // pattern 7
  };

  // CFEB cable pin map: input pair i (pairs 1-12 and 14-25 of the CFEB
  // connector, pair 13 being the clock sent back to the CFEB) carries
  // triad tr of layer ly_first in the first half of the 25 ns crossing and
  // triad tr of layer ly_second in the second half.
  typedef struct packed {
    logic [2:0] ly_first;
    logic [2:0] ly_second;
    logic [2:0] tr;
  } cfeb_pin_t;
  localparam cfeb_pin_t CFEB_PIN_MAP [0:23] = '{
    '{3'd0,3'd3,3'd0}, '{3'd0,3'd3,3'd2}, '{3'd5,3'd4,3'd0}, '{3'd5,3'd4,3'd2},
    '{3'd1,3'd2,3'd0}, '{3'd1,3'd2,3'd2}, '{3'd0,3'd3,3'd4}, '{3'd0,3'd3,3'd6},
    '{3'd5,3'd4,3'd4}, '{3'd5,3'd4,3'd6}, '{3'd1,3'd2,3'd4}, '{3'd1,3'd2,3'd6},
    '{3'd1,3'd2,3'd7}, '{3'd1,3'd2,3'd5}, '{3'd5,3'd4,3'd7}, '{3'd5,3'd4,3'd5},
    '{3'd0,3'd3,3'd7}, '{3'd0,3'd3,3'd5}, '{3'd1,3'd2,3'd3}, '{3'd1,3'd2,3'd1},
    '{3'd5,3'd4,3'd3}, '{3'd5,3'd4,3'd1}, '{3'd0,3'd3,3'd3}, '{3'd0,3'd3,3'd1}
  };

  // TTC broadcast command codes the TMB decodes.
  typedef enum logic [7:0] {
    TTC_BX0        = 8'h01,
    TTC_L1_RESET   = 8'h03,
    TTC_START_TRIG = 8'h06,
    TTC_STOP_TRIG  = 8'h07,
    TTC_MPC_INJECT = 8'h24,
    TTC_BXRESET    = 8'h32
  } ttc_cmd_e;

  // VME register file: word index = byte address / 2, addresses 00..CC.
  localparam int unsigned NREG = 'hCC / 2 + 1;  // 103 words

  // Register word indices used by the TMB logic.
  localparam int unsigned R_CCB_STAT  = 'h2E/2;
  localparam int unsigned R_ALCT0_RCD = 'h3A/2;
  localparam int unsigned R_ALCT1_RCD = 'h3C/2;
  localparam int unsigned R_CFEB_INJ  = 'h42/2;
  localparam int unsigned R_CFEB_INJ_ADR   = 'h44/2;
  localparam int unsigned R_CFEB_INJ_WDATA = 'h46/2;
  localparam int unsigned R_CFEB_INJ_RDATA = 'h48/2;
  localparam int unsigned R_HCM001    = 'h4A/2;   // first of 15 hot channel masks
  localparam int unsigned R_SEQ_TRIG_EN = 'h68/2;
  localparam int unsigned R_SEQ_ID    = 'h6E/2;
  localparam int unsigned R_SEQ_CLCT  = 'h70/2;
  localparam int unsigned R_SEQ_OFFSET= 'h76/2;
  localparam int unsigned R_SEQ_CLCT0 = 'h78/2;
  localparam int unsigned R_SEQ_CLCT1 = 'h7A/2;
  localparam int unsigned R_TMB_TRIG  = 'h86/2;
  localparam int unsigned R_MPC0_F0   = 'h88/2;
  localparam int unsigned R_MPC0_F1   = 'h8A/2;
  localparam int unsigned R_MPC1_F0   = 'h8C/2;
  localparam int unsigned R_MPC1_F1   = 'h8E/2;
  localparam int unsigned R_MPC_INJ      = 'h90/2;
  localparam int unsigned R_MPC_RAM_ADR  = 'h92/2;
  localparam int unsigned R_MPC_RAM_WDATA= 'h94/2;
  localparam int unsigned R_MPC_RAM_RDATA= 'h96/2;
  localparam int unsigned R_SCP_CTRL     = 'h98/2;
  localparam int unsigned R_SCP_RDATA    = 'h9A/2;
  localparam int unsigned R_USR_JTAG     = 'h10/2;
  localparam int unsigned NJTAG          = 5;     // ALCT, mezzanine, user PROMs, monitor, RAT
  localparam int unsigned R_CCB_CMD   = 'h9C/2;
  localparam int unsigned R_SEQMOD    = 'hAC/2;
  localparam int unsigned R_SEQSM     = 'hAE/2;
  localparam int unsigned R_SEQCLCTM  = 'hB0/2;
  localparam int unsigned R_TMBTIM    = 'hB2/2;
  localparam int unsigned R_LHC_CYCLE = 'hB4/2;

  // Power-up value of a register word (byte address adr).
  function automatic logic [15:0] reg_default(input logic [7:0] adr);
    case (adr)
      8'h0E: return 16'h0005;  8'h12: return 16'h24CD;  8'h14: return 16'h0020;
      8'h16: return 16'h0218;  8'h18: return 16'h7000;  8'h1A: return 16'h7777;
      8'h1C: return 16'h0FFF;  8'h20: return 16'h1FE0;  8'h24: return 16'h0500;
      8'h28: return 16'h0004;  8'h2A: return 16'h0038;  8'h2C: return 16'h7504;
      8'h30: return 16'h0001;  8'h32: return 16'h0040;  8'h34: return 16'h0877;
      8'h36: return 16'h0BD5;  8'h42: return 16'h7C1F;  8'h68: return 16'h0001;
      8'h6A: return 16'h1003;  8'h6C: return 16'h0771;  8'h6E: return 16'h00B5;
      8'h70: return 16'h5245;  8'h72: return 16'h0239;  8'h74: return 16'h0380;
      8'h86: return 16'h00FB;  8'h90: return 16'h0205;  8'hA6: return 16'h000F;
      8'hA8: return 16'hF000;  8'hAA: return 16'h0081;  8'hAC: return 16'h01C1;
      8'hB2: return 16'h0031;  8'hB4: return 16'h0DEC;  8'hB6: return 16'h001F;
      8'hBA: return 16'h1111;  8'hBC: return 16'h0005;
      8'h4A, 8'h4C, 8'h4E, 8'h50, 8'h52, 8'h54, 8'h56, 8'h58, 8'h5A, 8'h5C,
      8'h5E, 8'h60, 8'h62, 8'h64, 8'h66, 8'hC6, 8'hC8, 8'hCA, 8'hCC: return 16'hFFFF;
      default: return 16'h0000;
    endcase
  endfunction

  // Bits of a register word that VME can write; the rest read status.
  function automatic logic [15:0] reg_wmask(input logic [7:0] adr);
    case (adr)
      8'h0E: return 16'h0004;  8'h10: return 16'h007F;  8'h12: return 16'h7FFF;
      8'h14: return 16'h003F;  8'h16, 8'h18, 8'h1A: return 16'hFFFF;
      8'h1C: return 16'h0FFF;  8'h1E: return 16'h001F;  8'h20: return 16'h1FFF;
      8'h22: return 16'hFFFF;  8'h24: return 16'h07C0;  8'h26: return 16'h1CE7;
      8'h28: return 16'h0C1F;  8'h2A: return 16'h007F;  8'h2C: return 16'hFF7F;
      8'h30: return 16'h0FFF;  8'h32: return 16'h00FF;  8'h34, 8'h36: return 16'h1FFF;
      8'h42: return 16'hFFFF;  8'h44: return 16'h3FFF;  8'h46: return 16'hFFFF;
      8'h4A, 8'h4C, 8'h4E, 8'h50, 8'h52, 8'h54, 8'h56, 8'h58, 8'h5A, 8'h5C,
      8'h5E, 8'h60, 8'h62, 8'h64, 8'h66: return 16'hFFFF;
      8'h68: return 16'h03FF;  8'h6A: return 16'hFFFF;  8'h6C: return 16'h0FFF;
      8'h6E: return 16'h1FFF;  8'h70: return 16'hFFFF;  8'h72, 8'h74: return 16'h1FFF;
      8'h76, 8'h7E, 8'h80: return 16'hFFFF;  8'h86: return 16'h01FF;
      8'h90: return 16'h03FF;  8'h92, 8'h94: return 16'hFFFF;  8'h98: return 16'hFF3F;
      8'h9C: return 16'hFFCF;  8'hA2: return 16'h1FFF;  8'hA6, 8'hA8: return 16'hFFFF;
      8'hAA: return 16'h00FF;  8'hAC: return 16'h1FFF;  8'hB2: return 16'h00FF;
      8'hB4: return 16'h0FFF;  8'hB6: return 16'h07FF;  8'hBA: return 16'hFFFF;
      8'hBC: return 16'h07FF;  8'hBE, 8'hC0, 8'hC6, 8'hC8, 8'hCA, 8'hCC: return 16'hFFFF;
      default: return 16'h0000;
    endcase
  endfunction

  // LCT quality code from the match type and the layer count.
  function automatic logic [3:0] lct_quality_f(
      input logic match, input logic clct_only, input logic alct_only,
      input logic alct_amu, input logic clct_hsds, input logic [3:0] nlayers);
    if (match && nlayers >= 4'd8)
      return (clct_hsds ? 4'd11 : 4'd6) + (nlayers - 4'd8);
    if (clct_only) return clct_hsds ? 4'd5 : 4'd4;
    if (alct_only) return 4'd3;
    if (match && alct_amu) return 4'd2;
    return 4'd0;
  endfunction

endpackage
