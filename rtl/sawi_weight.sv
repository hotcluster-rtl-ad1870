// sawi_weight: Spare Availability Weight Initialization for one router.
//
// The online cluster finder lets a router borrow only from neighbours of
// lower weight. SAWI sets the weight from how many spare clusters a router
// can give away: weight = 4 - (unused healthy clusters). A router keeps four
// clusters for its own link, so its unused clusters are the healthy own
// clusters (original plus internal redundant) beyond four. A router with a
// spare therefore gets a lower weight and becomes a lender. The formula is
// the paper's; reading "unused" as "healthy beyond four" is this design's.
// Purely combinational.
module sawi_weight #(
  parameter int unsigned WW = 5
) (
  input  logic [2:0]    healthy,   // healthy own clusters, 0..5
  output logic [WW-1:0] weight
);

  logic [2:0] unused;

  always_comb begin
    unused = (healthy > 3'd4) ? healthy - 3'd4 : 3'd0;
    weight = WW'(3'd4 - unused);
  end

endmodule
