// lct_quality: 4-bit quality of the two LCTs sent to the muon port card.
//
// The layer count of an LCT is (ALCT quality + 3) + CLCT layers hit, i.e.
// the anode layers implied by the ALCT quality plus the cathode layers.
// Quality, highest priority first:
//   ALCT and CLCT matched, half-strip pattern, >= 8 layers : 11 + (n - 8)
//   ALCT and CLCT matched, di-strip pattern,   >= 8 layers :  6 + (n - 8)
//   CLCT only, half-strip / di-strip pattern               :  5 / 4
//   ALCT only                                              :  3
//   matched with an accelerator-muon ALCT                  :  2
//   otherwise                                              :  0
// Both LCTs use the same match type with their own ALCT/CLCT fields.
// Purely combinational.  The code table is the document's quality logic
// (its "ALCT-only accelerator muon = 1" branch can never be reached behind
// the ALCT-only branch and is left out).
module lct_quality
  import tmb_pkg::*;
(
  input  logic       match,
  input  logic       clct_only,
  input  logic       alct_only,
  input  logic [1:0] alct_q0,      // ALCT quality of LCT 0 / 1
  input  logic [1:0] alct_q1,
  input  logic       alct_amu0,    // ALCT accelerator-muon flag
  input  logic       alct_amu1,
  input  logic [2:0] clct_nhit0,   // CLCT layers hit
  input  logic [2:0] clct_nhit1,
  input  logic       clct_hsds0,   // 1 = half-strip CLCT pattern
  input  logic       clct_hsds1,
  output logic [3:0] quality0,
  output logic [3:0] quality1
);

  logic [3:0] nlayers0, nlayers1;

  assign nlayers0 = 4'(alct_q0) + 4'd3 + 4'(clct_nhit0);
  assign nlayers1 = 4'(alct_q1) + 4'd3 + 4'(clct_nhit1);

  assign quality0 = lct_quality_f(match, clct_only, alct_only, alct_amu0, clct_hsds0, nlayers0);
  assign quality1 = lct_quality_f(match, clct_only, alct_only, alct_amu1, clct_hsds1, nlayers1);

endmodule
