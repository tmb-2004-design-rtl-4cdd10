// vme_regs: VME A24/D16 slave and register file of the TMB.
//
// The board answers address modifiers 39h (A24 non-privileged) and 3Dh (A24
// supervisor), word accesses only (A[0]=0).  A[23:19] selects the board:
// either the slot's geographic address or the rotary-switch local address
// (geo_sel chooses, as the board shunt does).  26 (all TMBs) and 27 (all
// peripheral-crate modules) are global addresses accepted for writes.
// A[7:0] is the register byte address, 00..CC; A[18:8] must be zero.
//
// Each register word holds its VME-writable bits (write mask and power-up
// value from tmb_pkg); the other bits of the word read back from the
// matching stat[] input, so the rest of the design supplies status through
// one array.  ID registers 0-3 are built here from the firmware constants:
// type/version/slot, month-day (BCD), year (BCD) and the 14-bit revcode
//   revcode[8:0]   = (month*10-decoded)*32 + day,
//   revcode[11:9]  = year[2:0],  revcode[13:12] = fpgaid[15:12].
// The address of the last accepted write is kept for the two read-back
// registers (0A, 0C); A[0] is always 0 for an accepted access, so it is
// not stored and the read-back shows the LWORD line in its place.
//
// Bus handshake: the VME strobes are assumed synchronised upstream into a
// one-clock vme_strobe.  A matching access is acknowledged by vme_dtack one
// clock later, together with vme_rdata for reads; writes take effect on the
// same edge that raises vme_dtack, and wr_pulse[i] marks that edge.  Global
// (broadcast) reads are not acknowledged so that boards never drive the bus
// together.  The strobe handshake and the broadcast-read rule are choices of
// this design; the address decoding, register layout, defaults and revcode
// follow the register map.
module vme_regs
  import tmb_pkg::*;
#(
  parameter logic [3:0]  FIRMWARE_TYPE = 4'hC,
  parameter logic [3:0]  VERSION       = 4'hD,
  parameter logic [15:0] MONTHDAY      = 16'h0608,
  parameter logic [15:0] YEAR          = 16'h2004,
  parameter logic [15:0] FPGAID        = 16'h3000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vme_strobe,
  input  logic        vme_write,
  input  logic [23:0] vme_adr,
  input  logic        vme_lword,
  input  logic [5:0]  vme_am,
  input  logic [15:0] vme_wdata,
  output logic [15:0] vme_rdata,
  output logic        vme_dtack,
  input  logic [4:0]  ga,         // backplane geographic address
  input  logic [4:0]  sw_adr,     // rotary switches SW2*16+SW1
  input  logic        geo_sel,    // 1 = use geographic address
  output logic [15:0] cfg [NREG],
  input  logic [15:0] stat [NREG],
  output logic [NREG-1:0] wr_pulse
);

  localparam logic [4:0] GLOBAL_TMB = 5'd26;   // all TMBs
  localparam logic [4:0] GLOBAL_ALL = 5'd27;   // all peripheral-crate modules

  function automatic logic [3:0] bcd2(input logic [7:0] b);
    return 4'(b[7:4] * 4'd10 + b[3:0]);
  endfunction

  logic [13:0] revcode;
  always_comb begin
    revcode[8:0]   = 9'(bcd2(MONTHDAY[15:8]) * 9'd32) + 9'(bcd2(MONTHDAY[7:0]));
    revcode[11:9]  = YEAR[2:0];
    revcode[13:12] = FPGAID[13:12];
  end

  logic [4:0] board_adr;
  logic       am_ok, adr_ok, bcast, hit;
  logic [7:0] radr;
  assign board_adr = geo_sel ? ga : sw_adr;
  assign am_ok  = (vme_am == 6'h39) || (vme_am == 6'h3D);
  assign radr   = vme_adr[7:0];
  assign adr_ok = (vme_adr[18:8] == '0) && !radr[0] && (radr <= 8'hCC);
  assign bcast  = (vme_adr[23:19] == GLOBAL_TMB) || (vme_adr[23:19] == GLOBAL_ALL);
  assign hit    = vme_strobe && am_ok && adr_ok &&
                  ((vme_adr[23:19] == board_adr) || (bcast && vme_write));

  logic [23:1] last_adr;
  logic        last_lword;
  logic [5:0]  last_am;

  // Read value of word i: writable bits from cfg, the rest from status.
  function automatic logic [15:0] read_word(input int unsigned i,
      input logic [15:0] c, input logic [15:0] s);
    logic [15:0] m;
    m = reg_wmask(8'(2 * i));
    return (c & m) | (s & ~m);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) cfg[i] <= reg_default(8'(2 * i));
      vme_dtack  <= 1'b0;
      vme_rdata  <= '0;
      wr_pulse   <= '0;
      last_adr   <= '0;
      last_lword <= 1'b0;
      last_am    <= '0;
    end else begin
      vme_dtack <= hit;
      wr_pulse  <= '0;
      if (hit && vme_write) begin
        for (int i = 0; i < NREG; i++)
          if (radr[7:1] == 7'(i)) begin
            cfg[i] <= (cfg[i] & ~reg_wmask(8'(2 * i))) | (vme_wdata & reg_wmask(8'(2 * i)));
            wr_pulse[i] <= 1'b1;
          end
        last_adr   <= vme_adr[23:1];
        last_lword <= vme_lword;
        last_am    <= vme_am;
      end
      if (hit && !vme_write) begin
        case (radr)
          8'h00:   vme_rdata <= {3'b000, ga, VERSION, FIRMWARE_TYPE};
          8'h02:   vme_rdata <= MONTHDAY;
          8'h04:   vme_rdata <= YEAR;
          8'h06:   vme_rdata <= {2'b00, revcode};
          8'h0A:   vme_rdata <= {last_adr[15:1], last_lword};  // A[0] is always 0
          8'h0C:   vme_rdata <= {2'b00, last_am, last_adr[23:16]};
          default: begin
            vme_rdata <= '0;
            for (int i = 0; i < NREG; i++)
              if (radr[7:1] == 7'(i)) vme_rdata <= read_word(i, cfg[i], stat[i]);
          end
        endcase
      end
    end
  end

endmodule
