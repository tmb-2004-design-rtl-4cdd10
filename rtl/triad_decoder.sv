// triad_decoder: converts the triad bit streams of one CFEB into half-strip
// hits.
//
// A CFEB reports each di-strip (two cathode strips, four half-strips) of
// each layer as a "triad": a 3-bit serial word sent one bit per 25 ns
// clock.  The first bit is a 1 that marks a hit, the second selects the
// strip inside the di-strip and the third the half-strip inside that strip,
// so the decoded half-strip is {strip, half} (0..3) within the di-strip.
// When the third bit arrives the half-strip output turns on and stays on
// for triad_persist+1 clocks (a one-shot; the default 5 gives the 150 ns
// persistence of the register description).  A new triad on the same
// half-strip restarts the one-shot.
//
// Masks: hcm[layer][distrip]=0 (hot channel mask) ignores that di-strip and
// cfeb_en=0 (the "mask all" bit of the CFEB) ignores the whole board; a
// masked di-strip neither starts a triad nor keeps its outputs on.
// Interface: triad[l*NTRIAD+t] is the bit of layer l, di-strip t this
// clock; hs[l*4*NTRIAD + 4*t + i] is half-strip i of that di-strip, a
// registered output valid from the clock after the third triad bit.
// The meaning of the three triad bits and the one-shot length rule are this
// design's reading; the document names the triad decoder, the persistence
// setting and the masks.
module triad_decoder
  import tmb_pkg::*;
#(
  parameter int unsigned NLY = NLAYER,
  parameter int unsigned NTR = NTRIAD
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NLY*NTR-1:0]   triad,
  input  logic [NLY*NTR-1:0]   hcm,
  input  logic                 cfeb_en,
  input  logic [3:0]           triad_persist,
  output logic [NLY*NTR*4-1:0] hs
);

  typedef enum logic [1:0] {T_IDLE, T_STRIP, T_HALF} tstate_e;

  for (genvar d = 0; d < NLY * NTR; d++) begin : g_ds
    tstate_e    st;
    logic       strip_q;
    logic [4:0] cnt [4];
    logic       en;
    assign en = hcm[d] && cfeb_en;

    always_ff @(posedge clk) begin
      if (rst || !en) begin
        st      <= T_IDLE;
        strip_q <= 1'b0;
        for (int i = 0; i < 4; i++) cnt[i] <= '0;
      end else begin
        for (int i = 0; i < 4; i++)
          if (cnt[i] != '0) cnt[i] <= cnt[i] - 5'd1;
        case (st)
          T_IDLE:  if (triad[d]) st <= T_STRIP;
          T_STRIP: begin strip_q <= triad[d]; st <= T_HALF; end
          default: begin
            cnt[{strip_q, triad[d]}] <= {1'b0, triad_persist} + 5'd1;
            st <= T_IDLE;
          end
        endcase
      end
    end

    for (genvar i = 0; i < 4; i++) begin : g_hs
      assign hs[4 * d + i] = (cnt[i] != '0);
    end
  end

endmodule
