// viterbi_acs: add-compare-select unit for one trellis state.
//
// A state is entered from two predecessor states, the one whose dropped
// (oldest) bit was 0 and the one whose dropped bit was 1. The unit adds each
// predecessor's path metric to the branch metric of its branch, keeps the
// smaller sum as the new path metric and reports in dec which predecessor
// won (1 = the one whose dropped bit was 1). On a tie the 0 predecessor is
// kept. Path metrics are unsigned and are not normalised: the width PMW is
// chosen by the caller so that a whole frame cannot overflow.
// Combinational; the path metric registers live in viterbi_pmu. The
// add-compare-select step is the standard one of the Viterbi algorithm the
// source builds on; the tie rule and the unnormalised metrics are this
// design's choices.
module viterbi_acs #(
  parameter int unsigned PMW = 8,
  parameter int unsigned BMW = 2
) (
  input  logic [PMW-1:0] pm0,
  input  logic [PMW-1:0] pm1,
  input  logic [BMW-1:0] bm0,
  input  logic [BMW-1:0] bm1,
  output logic [PMW-1:0] pm_new,
  output logic           dec
);
  logic [PMW-1:0] sum0, sum1;

  assign sum0   = pm0 + PMW'(bm0);
  assign sum1   = pm1 + PMW'(bm1);
  assign dec    = (sum1 < sum0);
  assign pm_new = dec ? sum1 : sum0;
endmodule
