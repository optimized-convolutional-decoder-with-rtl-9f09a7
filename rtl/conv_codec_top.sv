// conv_codec_top: error-correcting link for a MIMO-OFDM transceiver.
//
// Transmit side: data bits are coded by the rate-1/3 convolutional encoder
// (four flip-flops, zero tail per frame) and the coded frame is bit
// interleaved. Receive side: the received coded frame is de-interleaved,
// which scatters any burst of channel errors, and decoded by the Viterbi
// decoder, whose output leaves serially on sout / out_enable, together with
// err_detected / err_count, the number of coded bits it found in error. The MIMO-OFDM
// modulator, the radio channel and the demodulator are not part of this RTL:
// the interleaved symbols leave on tx_* and the received ones enter on rx_*.
// A loop-back (tx_* wired to rx_*, possibly with bit errors) gives the
// complete link.
//
// Timing: per frame of DATA_BITS data bits the transmit side accepts the
// data in DATA_BITS cycles, adds M tail cycles and then needs L = DATA_BITS+M
// cycles to drain the interleaver. The receive side needs L cycles to fill
// the de-interleaver, L more to feed the decoder, then L trace-back and
// DATA_BITS output cycles. All handshakes are valid/ready except the decoder
// output, which is a plain enable. reset is synchronous and active high.
module conv_codec_top #(
  parameter int unsigned N         = viterbi_pkg::CODE_N,
  parameter int unsigned M         = viterbi_pkg::CODE_M,
  parameter logic [N-1:0][M:0] GEN = viterbi_pkg::CODE_GEN,
  parameter int unsigned DATA_BITS = viterbi_pkg::DATA_BITS,
  parameter int unsigned ROWS      = viterbi_pkg::ILV_ROWS,
  parameter int unsigned COLS      = viterbi_pkg::ILV_COLS
) (
  input  logic         clk,
  input  logic         reset,
  // data to transmit
  input  logic         data_in,
  input  logic         data_valid,
  output logic         data_ready,
  // interleaved coded symbols towards the MIMO-OFDM modulator
  output logic [N-1:0] tx_sym,
  output logic         tx_valid,
  output logic         tx_last,
  input  logic         tx_ready,
  // coded symbols from the MIMO-OFDM demodulator
  input  logic [N-1:0] rx_sym,
  input  logic         rx_valid,
  output logic         rx_ready,
  // decoded data
  output logic         sout,
  output logic         out_enable,
  output logic         err_detected,
  output logic [$clog2(N*(DATA_BITS+M)+1)-1:0] err_count
);
  localparam int unsigned L = DATA_BITS + M;

  logic [N-1:0] enc_sym;
  logic         enc_valid, enc_last, enc_ready;
  logic [N-1:0] dil_sym;
  logic         dil_valid, dil_last, dil_ready;

  conv_encoder #(.N(N), .M(M), .GEN(GEN), .DATA_BITS(DATA_BITS)) u_enc (
    .clk       (clk),
    .reset     (reset),
    .in_bit    (data_in),
    .in_valid  (data_valid),
    .in_ready  (data_ready),
    .sym       (enc_sym),
    .sym_valid (enc_valid),
    .sym_last  (enc_last),
    .out_ready (enc_ready)
  );

  block_interleaver #(.W(N), .L(L), .ROWS(ROWS), .COLS(COLS)) u_ilv (
    .clk       (clk),
    .reset     (reset),
    .in_sym    (enc_sym),
    .in_valid  (enc_valid),
    .in_ready  (enc_ready),
    .out_sym   (tx_sym),
    .out_valid (tx_valid),
    .out_last  (tx_last),
    .out_ready (tx_ready)
  );

  // The de-interleaver is the interleaver with its matrix transposed.
  block_interleaver #(.W(N), .L(L), .ROWS(COLS), .COLS(ROWS)) u_dil (
    .clk       (clk),
    .reset     (reset),
    .in_sym    (rx_sym),
    .in_valid  (rx_valid),
    .in_ready  (rx_ready),
    .out_sym   (dil_sym),
    .out_valid (dil_valid),
    .out_last  (dil_last),
    .out_ready (dil_ready)
  );

  viterbi_decoder #(.N(N), .M(M), .GEN(GEN), .DATA_BITS(DATA_BITS)) u_dec (
    .clk        (clk),
    .reset      (reset),
    .rx_sym     (dil_sym),
    .rx_valid   (dil_valid),
    .rx_ready   (dil_ready),
    .sout         (sout),
    .out_enable   (out_enable),
    .err_detected (err_detected),
    .err_count    (err_count)
  );
endmodule
