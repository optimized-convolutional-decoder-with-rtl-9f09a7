// viterbi_bmu: branch metric unit of the hard-decision Viterbi decoder.
//
// For a received symbol of N bits it gives the Hamming distance to every
// one of the 2^N possible code words: bm[c] = number of bits in which rx_sym
// and c differ. Each trellis branch then uses the metric of the code word it
// would have produced, so the unit does not depend on the code generators.
// The source defines the metric as the count of bits in which the received
// and the expected bits differ; computing it per code word rather than per
// branch is this design's choice. Purely combinational.
module viterbi_bmu #(
  parameter int unsigned N   = viterbi_pkg::CODE_N,
  parameter int unsigned BMW = $clog2(N + 1)
) (
  input  logic [N-1:0]   rx_sym,
  output logic [BMW-1:0] bm [2**N]
);
  always_comb begin
    for (int c = 0; c < 2**N; c++) begin
      logic [N-1:0] diff;
      diff  = rx_sym ^ N'(c);
      bm[c] = '0;
      for (int b = 0; b < int'(N); b++)
        bm[c] = bm[c] + BMW'(diff[b]);
    end
  end
endmodule
