// tb_block_interleaver: self-checking test of the interleaver and of the
// de-interleaver made from it (same module, rows and columns swapped).
//
// An interleaver (4 x 15) feeds a de-interleaver (15 x 4) directly, for
// frames of 20 three-bit symbols. Random data, random input gaps and random
// output stalls are applied. Checked: every interleaver output bit p equals
// input bit (p mod 4)*15 + p div 4 of its frame, the de-interleaver restores
// every frame exactly, out_last marks the 20th symbol, and with no gaps the
// first interleaved symbol appears 20 cycles after the first one entered.
module tb_block_interleaver;
  localparam int W = 3, L = 20, ROWS = 4, COLS = 15, B = W * L;

  logic clk = 0, reset = 1;
  logic [W-1:0] in_sym = '0, mid_sym, out_sym;
  logic in_valid = 0, in_ready, mid_valid, mid_last, mid_ready;
  logic out_valid, out_last, out_ready = 0;
  int checks = 0, failures = 0;

  block_interleaver #(.W(W), .L(L), .ROWS(ROWS), .COLS(COLS)) u_ilv (
    .clk, .reset, .in_sym, .in_valid, .in_ready,
    .out_sym(mid_sym), .out_valid(mid_valid), .out_last(mid_last), .out_ready(mid_ready));
  block_interleaver #(.W(W), .L(L), .ROWS(COLS), .COLS(ROWS)) u_dil (
    .clk, .reset, .in_sym(mid_sym), .in_valid(mid_valid), .in_ready(mid_ready),
    .out_sym, .out_valid, .out_last, .out_ready);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [B-1:0] sent [$];  // frames in flight, oldest first
  logic [B-1:0] cur;
  int mid_idx = 0, out_idx = 0, mid_frame = 0, out_frame = 0;
  bit stalls = 0;
  int cycle = 0, first_in = -1, first_mid = -1;

  // monitors, sampled between clock edges
  always @(negedge clk) if (!reset) begin
    cycle++;
    if (mid_valid && first_mid < 0) first_mid = cycle;
    if (in_valid && in_ready && first_in < 0) first_in = cycle;
    if (mid_valid && mid_ready) begin
      for (int k = 0; k < W; k++) begin
        int p;
        p = mid_idx * W + k;
        check(mid_sym[k] == sent[mid_frame][(p % ROWS) * COLS + p / ROWS],
              $sformatf("interleaved bit %0d of frame %0d", p, mid_frame));
      end
      check(mid_last == (mid_idx == L - 1), "interleaver out_last");
      if (mid_idx == L - 1) begin mid_idx = 0; mid_frame++; end
      else mid_idx++;
    end
    if (out_valid && out_ready) begin
      check(out_sym == sent[out_frame][out_idx*W +: W],
            $sformatf("de-interleaved symbol %0d of frame %0d", out_idx, out_frame));
      check(out_last == (out_idx == L - 1), "de-interleaver out_last");
      if (out_idx == L - 1) begin out_idx = 0; out_frame++; end
      else out_idx++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    #1;
    for (int f = 0; f < 12; f++) begin
      stalls = (f >= 2);
      for (int i = 0; i < B; i++) cur[i] = 1'($urandom);
      sent.push_back(cur);
      for (int s = 0; s < L; s++) begin
        in_sym   = cur[s*W +: W];
        in_valid = stalls ? ($urandom % 3 != 0) : 1'b1;
        out_ready = stalls ? ($urandom % 3 != 0) : 1'b1;
        @(negedge clk);
        while (!(in_valid && in_ready)) begin
          @(posedge clk);
          #1;
          in_valid  = stalls ? ($urandom % 3 != 0) : 1'b1;
          out_ready = stalls ? ($urandom % 3 != 0) : 1'b1;
          @(negedge clk);
        end
        @(posedge clk);
        #1;
      end
      in_valid = 0;
    end
    out_ready = 1;
    repeat (4 * L) @(posedge clk);
    check(mid_frame == 12 && out_frame == 12,
          $sformatf("frames through: %0d interleaved, %0d restored", mid_frame, out_frame));
    check(first_mid - first_in == L, $sformatf("interleaver latency %0d", first_mid - first_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
