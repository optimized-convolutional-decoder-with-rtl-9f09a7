// conv_encoder: rate-1/N convolutional encoder with an automatic zero tail.
//
// A shift register of M flip-flops (M3..M0 at the default M = 4) holds the
// last M input bits; the new bit enters the top flip-flop. Each coded bit is
// the XOR of the serial input and the flip-flops selected by its generator
// word (see viterbi_pkg), which at the defaults gives the three output
// equations of the rate-1/3 encoder:
//   S2 = S_in^M3^M2^M1^M0, S1 = S_in^M3^M1^M0, S0 = S_in^M2^M0.
// Data is coded in frames of DATA_BITS bits. After the last data bit the
// encoder feeds M zero bits of its own, which returns every flip-flop to 0,
// so each frame starts and ends in state 0 (that tail is what lets the
// decoder trace back from state 0). Framing and the tail insertion are this
// design's choices; the shift register and XOR equations follow the source.
//
// Interface: in_bit/in_valid/in_ready is a valid-ready input (in_ready is
// low during the tail). sym/sym_valid/sym_last is combinational from the
// input bit and the register, so a symbol leaves in the same cycle its bit
// is accepted; out_ready from the consumer holds the encoder. sym[N-1] is
// S2, sym[0] is S0. reset is synchronous and active high.
module conv_encoder #(
  parameter int unsigned N = viterbi_pkg::CODE_N,
  parameter int unsigned M = viterbi_pkg::CODE_M,
  parameter logic [N-1:0][M:0] GEN = viterbi_pkg::CODE_GEN,
  parameter int unsigned DATA_BITS = viterbi_pkg::DATA_BITS
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         in_bit,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [N-1:0] sym,
  output logic         sym_valid,
  output logic         sym_last,
  input  logic         out_ready
);
  localparam int unsigned L = DATA_BITS + M;
  localparam int unsigned CW = $clog2(L + 1);

  logic [M-1:0]  sreg;  // {M3, M2, M1, M0} at M = 4
  logic [CW-1:0] cnt;   // symbols of the current frame already sent
  logic          tail;
  logic          u;
  logic          step;

  assign tail      = (cnt >= CW'(DATA_BITS));
  assign u         = tail ? 1'b0 : in_bit;
  assign in_ready  = !tail && out_ready;
  assign sym_valid = tail || in_valid;
  assign sym_last  = (cnt == CW'(L - 1));
  assign step      = sym_valid && out_ready;

  always_comb begin
    for (int j = 0; j < int'(N); j++)
      sym[j] = ^({u, sreg} & GEN[j]);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      sreg <= '0;
      cnt  <= '0;
    end else if (step) begin
      sreg <= {u, sreg[M-1:1]};
      cnt  <= sym_last ? '0 : cnt + 1'b1;
    end
  end
endmodule
