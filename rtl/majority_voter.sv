// majority_voter: bit-level 2-of-3 voter for one configuration frame.
//
// For every cell position the voted value is the value held by at least two
// of the three modules; where all three agree nothing changes, and where one
// module differs from the other two the voted value replaces it. Besides the
// voted frame it reports, per module, which cells differ from the vote (the
// cells that a write-back will repair) and whether any cell of the frame
// disagrees at all, so that a frame that needs no repair need not be written.
//
// The 2-of-3 rule is the algorithm's; the error masks and the disagree flag
// are this design's, added so the controller can skip frames that agree.
//
// Interface: three frames in, voted frame and masks out; combinational.
module majority_voter #(
  parameter int unsigned W = 126
) (
  input  logic [W-1:0] m1,
  input  logic [W-1:0] m2,
  input  logic [W-1:0] m3,
  output logic [W-1:0] voted,
  output logic [W-1:0] err1,      // cells where module 1 differs from the vote
  output logic [W-1:0] err2,
  output logic [W-1:0] err3,
  output logic         disagree   // any cell of the frame differs between modules
);

  always_comb begin
    voted    = (m1 & m2) | (m1 & m3) | (m2 & m3);
    err1     = m1 ^ voted;
    err2     = m2 ^ voted;
    err3     = m3 ^ voted;
    disagree = |(err1 | err2 | err3);
  end

endmodule
