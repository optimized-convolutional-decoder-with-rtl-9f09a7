// viterbi_tbu: survivor memory and trace-back unit.
//
// During a frame the decisions of all 2^M states are written, one word per
// received symbol, into the survivor memory (L words of 2^M bits). When the
// L-th word has been written the unit traces back, one step per clock, from
// state 0 (the zero tail guarantees the frame ends there): at step t the
// decision bit d of the current state s is read, the data bit of that step
// is s[M-1] (the bit that entered the shift register), and the previous
// state is {s[M-2:0], d}. The L recovered bits are held in a register; the
// first DATA_BITS of them (the tail bits are dropped) are then sent out in
// their original order, one per clock, on sout with out_enable high.
//
// Phases and timing: FILL (ready = 1, dec_valid writes a word), TRACE (L
// cycles), SEND (DATA_BITS cycles, out_enable = 1), then FILL again. The
// first data bit appears L+1 cycles after the cycle in which the last
// decision word is written. The output names sout and out_enable follow the
// source's decoder simulation; phase structure and latency are this
// design's choice. reset is synchronous and active high.
module viterbi_tbu #(
  parameter int unsigned M         = viterbi_pkg::CODE_M,
  parameter int unsigned L         = viterbi_pkg::FRAME_SYMS,
  parameter int unsigned DATA_BITS = viterbi_pkg::DATA_BITS
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [2**M-1:0] dec,
  input  logic            dec_valid,
  output logic            ready,
  output logic            sout,
  output logic            out_enable
);
  localparam int unsigned NS = 2**M;
  localparam int unsigned CW = $clog2(L + 1);

  typedef enum logic [1:0] {FILL, TRACE, SEND} phase_t;

  phase_t        phase;
  logic [CW-1:0] ptr;
  logic [M-1:0]  state;
  logic [NS-1:0] surv [L];
  logic [L-1:0]  bits;
  logic          d;

  assign ready      = (phase == FILL);
  assign out_enable = (phase == SEND);
  assign sout       = bits[ptr];
  assign d          = surv[ptr][state];

  always_ff @(posedge clk) begin
    if (reset) begin
      phase <= FILL;
      ptr   <= '0;
      state <= '0;
      bits  <= '0;
    end else begin
      case (phase)
        FILL: if (dec_valid) begin
          surv[ptr] <= dec;
          if (ptr == CW'(L - 1)) begin
            phase <= TRACE;   // ptr stays at L-1: trace starts at the last step
            state <= '0;
          end else begin
            ptr <= ptr + 1'b1;
          end
        end
        TRACE: begin
          bits[ptr] <= state[M-1];
          state     <= {state[M-2:0], d};
          if (ptr == '0) phase <= SEND;
          else           ptr   <= ptr - 1'b1;
        end
        default: begin  // SEND
          if (ptr == CW'(DATA_BITS - 1)) begin
            ptr   <= '0;
            phase <= FILL;
          end else begin
            ptr <= ptr + 1'b1;
          end
        end
      endcase
    end
  end
endmodule
