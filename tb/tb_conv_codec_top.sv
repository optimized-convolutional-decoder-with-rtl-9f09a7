// tb_conv_codec_top: end-to-end test of the coded link at full size.
//
// The top runs with its default parameters (rate 1/3, four encoder
// flip-flops, 16-bit frames, 4 x 15 interleaver). The testbench closes the
// link with a channel model between tx_* and rx_*: it stalls at random
// (back-pressure towards the interleaver) and flips channel bits according
// to a per-frame error pattern: none, one bit, a burst of 4 adjacent channel
// bits, or 5 scattered bits.
// Checked: every transmitted symbol against a reference encoder and
// interleaver written here from the encoder equations and the interleaver
// formula, and every decoded frame against the data sent. Counted, and a
// failure if never seen: encoder tail steps, interleaved frames, channel
// stalls, frames with a single error, frames with a burst, frames with five
// scattered errors, all decoded correctly, and for every frame an error
// count equal to the number of channel bits flipped. At the de-interleaver
// output every 4-bit channel burst must have become four errors in four
// different symbols (counted as bursts spread).
module tb_conv_codec_top;
  localparam int DATA_BITS = 16, M = 4, L = DATA_BITS + M, N = 3;
  localparam int ROWS = 4, COLS = 15, B = N * L;
  localparam int FRAMES = 48;

  logic clk = 0, reset = 1;
  logic data_in = 0, data_valid = 0, data_ready;
  logic [N-1:0] tx_sym, rx_sym;
  logic tx_valid, tx_last, tx_ready, rx_valid, rx_ready;
  logic sout, out_enable, err_detected;
  logic [5:0] err_count;
  int checks = 0, failures = 0;

  conv_codec_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  // reference: code one frame
  function automatic logic [B-1:0] code_frame(input logic [DATA_BITS-1:0] d);
    logic [B-1:0] c;
    logic [M-1:0] st;
    st = '0;
    for (int k = 0; k < L; k++) begin
      logic u;
      u = (k < DATA_BITS) ? d[k] : 1'b0;
      c[N*k +: N] = {u ^ st[3] ^ st[2] ^ st[1] ^ st[0], u ^ st[3] ^ st[1] ^ st[0], u ^ st[2] ^ st[0]};
      st = {u, st[3:1]};
    end
    return c;
  endfunction

  // reference: code and interleave one frame
  function automatic logic [B-1:0] tx_frame(input logic [DATA_BITS-1:0] d);
    logic [B-1:0] c, t;
    c = code_frame(d);
    for (int p = 0; p < B; p++) t[p] = c[(p % ROWS) * COLS + p / ROWS];
    return t;
  endfunction

  logic [DATA_BITS-1:0] frames [FRAMES];
  logic [B-1:0] err [FRAMES];
  int kind [FRAMES];  // 0 none, 1 single, 2 burst, 3 five scattered

  // channel
  bit chan_ok = 1;
  int tx_frame_idx = 0, tx_pos = 0;
  logic [B-1:0] exp_tx;
  assign tx_ready = rx_ready && chan_ok;
  assign rx_valid = tx_valid && chan_ok;
  always_comb begin
    for (int k = 0; k < N; k++)
      rx_sym[k] = tx_sym[k] ^ ((tx_frame_idx < FRAMES) ? err[tx_frame_idx][tx_pos*N + k] : 1'b0);
  end

  int n_tail = 0, n_ilv_frames = 0, n_stall = 0;
  int n_ok [4] = '{0, 0, 0, 0};

  always @(negedge clk) if (!reset) chan_ok = ($urandom % 5 != 0);

  // Monitors sample at the rising edge, before the design's registers move.
  always @(posedge clk) if (!reset) begin
    if (tx_valid && !tx_ready && rx_ready) n_stall++;
    if (dut.u_enc.sym_valid && !dut.u_enc.in_ready && dut.u_enc.out_ready) n_tail++;
  end

  // check the transmitted stream
  always @(posedge clk) if (!reset && tx_valid && tx_ready) begin
    if (tx_frame_idx < FRAMES) begin
      exp_tx = tx_frame(frames[tx_frame_idx]);
      check(tx_sym == exp_tx[tx_pos*N +: N], $sformatf("tx frame %0d symbol %0d", tx_frame_idx, tx_pos));
      check(tx_last == (tx_pos == L - 1), "tx_last");
    end
    if (tx_pos == L - 1) begin
      tx_pos <= 0;
      tx_frame_idx <= tx_frame_idx + 1;
      n_ilv_frames++;
    end else tx_pos <= tx_pos + 1;
  end

  // de-interleaver output: a channel burst must arrive as isolated errors
  int dil_frame = 0, dil_pos = 0, dil_err = 0, dil_max = 0, n_spread = 0;
  logic [B-1:0] exp_code;
  always @(posedge clk) if (!reset && dut.dil_valid && dut.dil_ready) begin
    int e;
    exp_code = code_frame(frames[dil_frame]);
    e = $countones(dut.dil_sym ^ exp_code[dil_pos*N +: N]);
    dil_err += e;
    if (e > dil_max) dil_max = e;
    if (dil_pos == L - 1) begin
      check(dil_err == $countones(err[dil_frame]), $sformatf("frame %0d: errors after de-interleaving", dil_frame));
      if (kind[dil_frame] == 2) begin
        check(dil_max == 1, $sformatf("frame %0d: burst left %0d errors in one symbol", dil_frame, dil_max));
        if (dil_max == 1) n_spread++;
      end
      dil_pos = 0;
      dil_err = 0;
      dil_max = 0;
      dil_frame++;
    end else dil_pos++;
  end

  // decoded output
  int rx_frame_idx = 0, rx_bit = 0;
  always @(posedge clk) if (!reset && out_enable) begin
    if (rx_frame_idx < FRAMES) begin
      if (rx_bit == 0)
        check(int'(err_count) == $countones(err[rx_frame_idx]) && err_detected == (err[rx_frame_idx] != '0),
              $sformatf("frame %0d: %0d errors reported, %0d injected", rx_frame_idx, err_count, $countones(err[rx_frame_idx])));
      check(sout == frames[rx_frame_idx][rx_bit],
            $sformatf("decoded frame %0d (kind %0d) bit %0d", rx_frame_idx, kind[rx_frame_idx], rx_bit));
      if (rx_bit == DATA_BITS - 1) begin
        n_ok[kind[rx_frame_idx]]++;
        rx_frame_idx++;
        rx_bit = 0;
      end else rx_bit++;
    end else begin
      check(0, "output beyond the last frame");
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      frames[f] = DATA_BITS'($urandom);
      kind[f] = f % 4;
      err[f] = '0;
      case (kind[f])
        1: err[f][$urandom % B] = 1'b1;
        2: begin
          int s;
          s = $urandom % (B - ROWS);
          for (int k = 0; k < ROWS; k++) err[f][s + k] = 1'b1;
        end
        3: for (int k = 0; k < 5; k++) err[f][$urandom % B] = 1'b1;
        default: ;
      endcase
    end
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    #1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int i = 0; i < DATA_BITS; i++) begin
        data_in = frames[f][i];
        data_valid = 1;
        @(negedge clk);
        while (!data_ready) begin
          @(posedge clk);
          #1;
          @(negedge clk);
        end
        @(posedge clk);
        #1;
      end
      data_valid = 0;
    end
    while (rx_frame_idx < FRAMES) begin
      @(posedge clk);
      #1;
    end
    check(n_tail == FRAMES * M, $sformatf("encoder tail steps %0d", n_tail));
    check(n_ilv_frames == FRAMES, $sformatf("interleaved frames %0d", n_ilv_frames));
    check(n_stall > 0, $sformatf("channel stalls %0d", n_stall));
    check(n_spread == FRAMES / 4, $sformatf("bursts spread by the de-interleaver %0d", n_spread));
    for (int k = 0; k < 4; k++)
      check(n_ok[k] == FRAMES / 4, $sformatf("frames of error kind %0d decoded: %0d", k, n_ok[k]));
    $display("tail steps %0d, interleaved frames %0d, channel stalls %0d, bursts spread %0d",
             n_tail, n_ilv_frames, n_stall, n_spread);
    $display("frames decoded: clean %0d, single error %0d, burst %0d, five errors %0d",
             n_ok[0], n_ok[1], n_ok[2], n_ok[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
