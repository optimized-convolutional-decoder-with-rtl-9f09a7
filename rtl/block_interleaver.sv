// block_interleaver: frame-wide bit interleaver / de-interleaver.
//
// A frame of L symbols of W bits (W*L = ROWS*COLS bits) is written into a
// buffer in arrival order, bit k of symbol s at position s*W+k. It is then
// read out in column order: output bit p is buffer bit
//   (p mod ROWS)*COLS + p div ROWS,
// i.e. the bits are written row by row into a ROWS x COLS matrix and read
// column by column. Two bits that are adjacent at the output were COLS
// positions apart at the input, so a channel burst of up to ROWS bits lands
// on bits at least COLS apart once undone. The same module with ROWS and
// COLS swapped is the exact inverse, which is how the de-interleaver is
// built. The matrix shape is this design's choice: the source only says that
// interleaving spreads errors so that the decoder sees no bursts.
//
// Interface and timing: the block alternates between a fill phase
// (in_ready = 1, one symbol per in_valid) and a drain phase (out_valid = 1,
// one symbol per out_ready, out_last on the final one). The buffer is
// single: a frame is fully written before any of it is read, so the block
// adds L cycles of latency and takes 2*L cycles per frame at full rate.
// reset is synchronous and active high.
module block_interleaver #(
  parameter int unsigned W    = viterbi_pkg::CODE_N,
  parameter int unsigned L    = viterbi_pkg::FRAME_SYMS,
  parameter int unsigned ROWS = viterbi_pkg::ILV_ROWS,
  parameter int unsigned COLS = viterbi_pkg::ILV_COLS
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] in_sym,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [W-1:0] out_sym,
  output logic         out_valid,
  output logic         out_last,
  input  logic         out_ready
);
  localparam int unsigned B  = W * L;
  localparam int unsigned CW = $clog2(L + 1);

  initial assert (ROWS * COLS == B) else $error("ROWS*COLS must equal W*L");

  typedef enum logic {FILL, DRAIN} phase_t;

  phase_t        phase;
  logic [CW-1:0] idx;
  logic [B-1:0]  buffer;

  assign in_ready  = (phase == FILL);
  assign out_valid = (phase == DRAIN);
  assign out_last  = (phase == DRAIN) && (idx == CW'(L - 1));

  always_comb begin
    for (int k = 0; k < int'(W); k++) begin
      int p;
      p = int'(idx) * int'(W) + k;
      out_sym[k] = buffer[(p % int'(ROWS)) * int'(COLS) + p / int'(ROWS)];
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      phase  <= FILL;
      idx    <= '0;
      buffer <= '0;
    end else if (phase == FILL) begin
      if (in_valid) begin
        buffer[idx*W +: W] <= in_sym;
        if (idx == CW'(L - 1)) begin
          idx   <= '0;
          phase <= DRAIN;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end else if (out_ready) begin
      if (idx == CW'(L - 1)) begin
        idx   <= '0;
        phase <= FILL;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
