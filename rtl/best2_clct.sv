// best2_clct: priority encoder that picks the two best cathode patterns.
//
// Every key half-strip offers a pattern number and a layer count; their
// rank is {nhit, pat}, so more layers always win and among equal counts the
// higher pattern number wins.  The best key is the highest rank, the lowest
// key winning a tie.  The second best is chosen the same way among keys
// more than BUSY_HW half-strips away from the best key, so that one track
// seen at neighbouring keys is not reported twice.  A key with nhit=0 is
// never chosen; found0/found1 say whether a candidate exists.
// Purely combinational.  The document names the priority encoder and the
// "best 2 LCTs" step only; the ranking, the tie rule and the exclusion
// width are this design's.
module best2_clct #(
  parameter int unsigned NKEY    = 160,
  parameter int unsigned BUSY_HW = 2,
  localparam int unsigned KW     = $clog2(NKEY)
) (
  input  logic [2:0]    pat  [NKEY],
  input  logic [2:0]    nhit [NKEY],
  output logic          found0,
  output logic [KW-1:0] key0,
  output logic [2:0]    pat0,
  output logic [2:0]    nhit0,
  output logic          found1,
  output logic [KW-1:0] key1,
  output logic [2:0]    pat1,
  output logic [2:0]    nhit1
);

  always_comb begin
    logic [5:0] best;
    logic [5:0] rank;
    best   = '0;
    found0 = 1'b0;
    key0   = '0;
    for (int k = 0; k < NKEY; k++) begin
      rank = {nhit[k], pat[k]};
      if (nhit[k] != '0 && rank > best) begin
        best   = rank;
        key0   = KW'(k);
        found0 = 1'b1;
      end
    end
    pat0  = best[2:0];
    nhit0 = best[5:3];

    best   = '0;
    found1 = 1'b0;
    key1   = '0;
    for (int k = 0; k < NKEY; k++) begin
      rank = {nhit[k], pat[k]};
      if (found0 && nhit[k] != '0 && rank > best &&
          (k > int'(key0) + int'(BUSY_HW) || k + int'(BUSY_HW) < int'(key0))) begin
        best   = rank;
        key1   = KW'(k);
        found1 = 1'b1;
      end
    end
    pat1  = best[2:0];
    nhit1 = best[5:3];
  end

endmodule
