// pattern_unit: cathode pattern look-up for one key half-strip.
//
// Each of the six layers contributes a window of four half-strips,
// hs 0..3 = key-1 .. key+2, so the key half-strip is hs 1 of layer 3.  For
// each layer the 4-bit window addresses a 16-bit LUT (tmb_pkg::PAT_LUT) and
// the LUT bit says whether that layer is "hit" for the pattern.  The cell
// envelope (any of hs 0..2 on layers 0,1,2,4,5, hs 1 on layer 3) gives
// env_nhit, the number of layers hit anywhere near the key, used for the
// pre-trigger.  The seven bend patterns each give a layer count; the
// best pattern is the one with the most layers, the higher pattern number
// winning a tie (pattern 7, the straight track, first).  pat is 0 and nhit
// 0 when no pattern has a hit.
// Purely combinational.  The LUT contents and the window bit order are the
// document's; the window alignment (key = hs 1 on every layer, no layer
// stagger) and the tie rule are this design's choices.
module pattern_unit
  import tmb_pkg::*;
(
  input  logic [3:0] win [NLAYER],   // half-strips key-1..key+2 of each layer
  output logic [2:0] env_nhit,
  output logic [2:0] pat,
  output logic [2:0] nhit
);

  logic [2:0] cnt [NPAT+1];

  always_comb begin
    for (int p = 0; p <= NPAT; p++) begin
      cnt[p] = '0;
      for (int l = 0; l < NLAYER; l++)
        cnt[p] = cnt[p] + 3'(PAT_LUT[p][l][win[l]]);
    end
    env_nhit = cnt[0];
    pat  = '0;
    nhit = '0;
    for (int p = 1; p <= NPAT; p++)
      if (cnt[p] != '0 && cnt[p] >= nhit) begin
        pat  = 3'(p);
        nhit = cnt[p];
      end
  end

endmodule
