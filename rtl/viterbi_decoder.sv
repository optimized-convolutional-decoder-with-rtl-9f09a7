// viterbi_decoder: hard-decision Viterbi decoder for the rate-1/3 code.
//
// The decoder follows the three steps of the Viterbi algorithm: the branch
// metric unit compares each received symbol with every possible code word,
// the path metric unit (one add-compare-select unit per trellis state, 16 at
// the defaults) keeps the best path into each state and records which
// predecessor it came from, and the trace-back unit walks those decisions
// back from the final state to recover the data bits, which leave serially.
//
// Operation is frame by frame. A frame is L = DATA_BITS + M symbols of N
// bits (the data plus the encoder's zero tail), received serially, one
// symbol per clock while rx_ready is high. After the last symbol, rx_ready
// drops for L trace-back cycles and DATA_BITS output cycles; the decoded
// bits come out in order on sout while out_enable is high, the first one
// L+1 cycles after the last symbol was accepted. The path metrics are
// cleared while the trace-back unit is busy, so the next frame starts from
// state 0 again.
//
// Error detection: the final path metric of state 0 is the number of
// received bits that differ from the code of the decoded data. It is
// captured when the trace-back starts and shown on err_count, with
// err_detected = (err_count != 0), from the frame's first output bit until
// the next frame's trace-back starts. While the errors are correctable (up
// to 5 per frame for the default code) err_count is the number of bits that
// were corrected. Frame length, handshake, this timing and the error count
// output are this design's choices; the metric definition, the unit
// structure and the detect-and-correct role follow the source.
// reset is synchronous and active high.
module viterbi_decoder #(
  parameter int unsigned N         = viterbi_pkg::CODE_N,
  parameter int unsigned M         = viterbi_pkg::CODE_M,
  parameter logic [N-1:0][M:0] GEN = viterbi_pkg::CODE_GEN,
  parameter int unsigned DATA_BITS = viterbi_pkg::DATA_BITS
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [N-1:0] rx_sym,
  input  logic         rx_valid,
  output logic         rx_ready,
  output logic         sout,
  output logic         out_enable,
  output logic         err_detected,
  output logic [$clog2(N*(DATA_BITS+M)+1)-1:0] err_count
);
  localparam int unsigned L   = DATA_BITS + M;
  localparam int unsigned EW  = $clog2(N * L + 1);
  localparam int unsigned BMW = $clog2(N + 1);
  // Largest real metric is N*L; start value 2^(PMW-1) lies above it and
  // 2^(PMW-1) + N*L still fits, so no normalisation is needed.
  localparam int unsigned PMW = $clog2(N * L + 1) + 1;

  logic [BMW-1:0]  bm [2**N];
  logic [PMW-1:0]  pm [2**M];
  logic [2**M-1:0] dec;
  logic            step;

  logic            rx_ready_q;

  assign step = rx_valid && rx_ready;

  // capture the final metric of state 0 in the first trace-back cycle,
  // before the clear that rx_ready = 0 applies takes effect
  always_ff @(posedge clk) begin
    if (reset) begin
      rx_ready_q <= 1'b1;
      err_count  <= '0;
    end else begin
      rx_ready_q <= rx_ready;
      if (rx_ready_q && !rx_ready) err_count <= pm[0][EW-1:0];
    end
  end

  assign err_detected = (err_count != '0);

  viterbi_bmu #(.N(N), .BMW(BMW)) u_bmu (
    .rx_sym (rx_sym),
    .bm     (bm)
  );

  viterbi_pmu #(.N(N), .M(M), .GEN(GEN), .PMW(PMW), .BMW(BMW)) u_pmu (
    .clk   (clk),
    .reset (reset),
    .clear (!rx_ready),
    .en    (step),
    .bm    (bm),
    .pm    (pm),
    .dec   (dec)
  );

  viterbi_tbu #(.M(M), .L(L), .DATA_BITS(DATA_BITS)) u_tbu (
    .clk        (clk),
    .reset      (reset),
    .dec        (dec),
    .dec_valid  (step),
    .ready      (rx_ready),
    .sout       (sout),
    .out_enable (out_enable)
  );
endmodule
