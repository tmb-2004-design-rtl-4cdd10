// lct_duplicate: completes the pair of LCTs sent to the muon port card.
//
// An LCT combines one ALCT with one CLCT.  When the cathode side found two
// muons but the anode side only one, the single ALCT is reused for the
// second LCT; likewise a single CLCT is reused when there are two ALCTs.
// When no ALCT exists at all (a CLCT-only event) the first ALCT is replaced
// by an empty dummy word that only carries the CLCT's bunch-crossing number
// in the ALCT bxn field, so the frame still has a time stamp.  The first
// CLCT is passed as it is.  first_vpf/second_vpf say whether each muon
// exists on either side.
// Purely combinational.  The rules are the document's duplication logic,
// rewritten over the alct_t/clct_t structures.
module lct_duplicate
  import tmb_pkg::*;
(
  input  alct_t alct0_in,
  input  alct_t alct1_in,
  input  clct_t clct0_in,
  input  clct_t clct1_in,
  output alct_t alct0,
  output alct_t alct1,
  output clct_t clct0,
  output clct_t clct1,
  output logic  first_vpf,
  output logic  second_vpf
);

  logic one_alct, two_alct, one_clct, two_clct;
  assign one_alct = alct0_in.vpf && !alct1_in.vpf;
  assign two_alct = alct0_in.vpf &&  alct1_in.vpf;
  assign one_clct = clct0_in.vpf && !clct1_in.vpf;
  assign two_clct = clct0_in.vpf &&  clct1_in.vpf;

  always_comb begin
    alct_t dummy;
    dummy     = '0;
    dummy.bxn = clct0_in.bxn;
    alct0 = alct0_in.vpf ? alct0_in : dummy;
    alct1 = (one_alct && two_clct) ? alct0_in : alct1_in;
    clct0 = clct0_in;
    clct1 = (one_clct && two_alct) ? clct0_in : clct1_in;
  end

  assign first_vpf  = alct0_in.vpf || clct0_in.vpf;
  assign second_vpf = alct1_in.vpf || clct1_in.vpf;

endmodule
