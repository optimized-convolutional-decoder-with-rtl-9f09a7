// viterbi_pmu: path metric unit, one ACS per trellis state.
//
// State s = {M(M-1) .. M0}; the input bit enters at the top, so state ns is
// reached from p0 = {ns[M-2:0], 0} and p1 = {ns[M-2:0], 1}, and the input
// bit of both branches is ns[M-1]. The expected code word of a branch is
// worked out from the generators at elaboration time and selects the branch
// metric from the BMU's per-code-word table. One ACS instance per state
// (2^M of them, 16 at the defaults) updates all path metrics in parallel in
// one clock cycle per received symbol.
//
// clear loads the start metrics: 0 for state 0 (a frame starts in state 0)
// and 2^(PMW-1) for every other state, a value larger than any real path can
// reach within a frame. en advances the trellis by one symbol. dec holds the
// decisions of the current step (combinational, valid while en is high) for
// the survivor memory. reset is synchronous and active high.
// The trellis follows from the encoder equations; the state count (16, from
// the four flip-flops that feed the outputs), the fully parallel ACS array
// and the start metrics are this design's reading and choices.
module viterbi_pmu #(
  parameter int unsigned N   = viterbi_pkg::CODE_N,
  parameter int unsigned M   = viterbi_pkg::CODE_M,
  parameter logic [N-1:0][M:0] GEN = viterbi_pkg::CODE_GEN,
  parameter int unsigned PMW = 8,
  parameter int unsigned BMW = $clog2(N + 1)
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           clear,
  input  logic           en,
  input  logic [BMW-1:0] bm  [2**N],
  output logic [PMW-1:0] pm  [2**M],
  output logic [2**M-1:0] dec
);
  localparam int unsigned NS = 2**M;

  // Code word produced by input bit u in state s.
  function automatic logic [N-1:0] code_word(input logic u, input logic [M-1:0] s);
    for (int j = 0; j < int'(N); j++)
      code_word[j] = ^({u, s} & GEN[j]);
  endfunction

  logic [PMW-1:0] pm_new [NS];

  for (genvar ns = 0; ns < NS; ns++) begin : g_acs
    localparam logic [M-1:0] NSV = M'(ns);
    localparam logic [M-1:0] P0  = M'({NSV, 1'b0});
    localparam logic [M-1:0] P1  = M'({NSV, 1'b1});
    localparam logic [N-1:0] C0  = code_word(NSV[M-1], P0);
    localparam logic [N-1:0] C1  = code_word(NSV[M-1], P1);

    viterbi_acs #(.PMW(PMW), .BMW(BMW)) u_acs (
      .pm0    (pm[P0]),
      .pm1    (pm[P1]),
      .bm0    (bm[C0]),
      .bm1    (bm[C1]),
      .pm_new (pm_new[ns]),
      .dec    (dec[ns])
    );
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < int'(NS); s++) begin
      if (reset || clear)
        pm[s] <= (s == 0) ? '0 : PMW'(1) << (PMW - 1);
      else if (en)
        pm[s] <= pm_new[s];
    end
  end
endmodule
