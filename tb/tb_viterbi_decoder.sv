// tb_viterbi_decoder: self-checking test of the Viterbi decoder.
//
// Part 1, small textbook code: a decoder built for the rate-1/2, 4-state
// code with generators 111 and 101 receives 11 01 01 10 01 (the code of
// 1 1 0 1 1 with its fourth word hit by one error) followed by the two tail
// words 01 11, and must return 1 1 0 1 1.
// Part 2, the design's rate-1/3 code at its defaults: random 16-bit frames
// are encoded here (S2 = u^M3^M2^M1^M0, S1 = u^M3^M1^M0, S0 = u^M2^M0, four
// zero tail bits) and hit by 0 to 5 random bit errors. The code's free
// distance is 12, so every such frame must decode exactly. Random input gaps
// are applied. Checked: the decoded bits, rx_ready high until the L-th
// symbol, the first output bit L+1 cycles after the last symbol,
// out_enable lasting DATA_BITS cycles, and err_count / err_detected equal to
// the number of bits actually flipped (1 for the textbook frame).
module tb_viterbi_decoder;
  localparam int DATA_BITS = 16, M = 4, L = DATA_BITS + M;

  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;

  // rate-1/3 decoder, defaults
  logic [2:0] rx_sym = '0;
  logic rx_valid = 0, rx_ready, sout, out_enable, err_detected;
  logic [5:0] err_count;
  viterbi_decoder dut (.*);

  // rate-1/2, K = 3 textbook decoder
  logic [1:0] ex_sym = '0;
  logic ex_valid = 0, ex_ready, ex_sout, ex_oe, ex_det;
  logic [3:0] ex_cnt;
  viterbi_decoder #(.N(2), .M(2), .GEN({3'b111, 3'b101}), .DATA_BITS(5)) u_ex (
    .clk, .reset, .rx_sym(ex_sym), .rx_valid(ex_valid), .rx_ready(ex_ready),
    .sout(ex_sout), .out_enable(ex_oe), .err_detected(ex_det), .err_count(ex_cnt));

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  int hist_errors [6];

  initial begin
    logic [1:0] ex_rx [7] = '{2'b11, 2'b01, 2'b01, 2'b10, 2'b01, 2'b01, 2'b11};
    logic [4:0] ex_exp = 5'b11011;  // first decoded bit in bit 4
    repeat (2) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    #1;

    // Part 1
    for (int t = 0; t < 7; t++) begin
      check(ex_ready, "textbook decoder ready");
      ex_sym = ex_rx[t];
      ex_valid = 1;
      @(posedge clk);
      #1;
    end
    ex_valid = 0;
    while (!ex_oe) begin @(posedge clk); #1; end
    check(ex_det && ex_cnt == 1, $sformatf("textbook frame: %0d error(s) reported", ex_cnt));
    for (int i = 0; i < 5; i++) begin
      check(ex_oe && ex_sout == ex_exp[4-i], $sformatf("textbook decoded bit %0d", i));
      @(posedge clk);
      #1;
    end
    check(!ex_oe, "textbook output ends after 5 bits");

    // Part 2
    for (int f = 0; f < 60; f++) begin
      logic [DATA_BITS-1:0] data;
      logic [3*L-1:0] code, emask;
      logic [M-1:0] st;
      int nerr, wait_cycles, got;
      nerr = f % 6;
      data = DATA_BITS'($urandom);
      st = '0;
      for (int t = 0; t < L; t++) begin
        logic u;
        u = (t < DATA_BITS) ? data[t] : 1'b0;
        code[3*t +: 3] = {u ^ st[3] ^ st[2] ^ st[1] ^ st[0], u ^ st[3] ^ st[1] ^ st[0], u ^ st[2] ^ st[0]};
        st = {u, st[3:1]};
      end
      emask = '0;
      for (int e = 0; e < nerr; e++) emask[$urandom % (3 * L)] ^= 1'b1;  // may hit a bit twice
      code ^= emask;
      hist_errors[nerr]++;
      for (int t = 0; t < L; t++) begin
        while (f > 10 && $urandom % 4 == 0) begin
          rx_valid = 0;
          @(posedge clk);
          #1;
        end
        check(rx_ready, "decoder ready during the frame");
        rx_sym = code[3*t +: 3];
        rx_valid = 1;
        @(posedge clk);
        #1;
      end
      rx_valid = 0;
      wait_cycles = 1;
      while (!out_enable && wait_cycles < 200) begin
        check(!rx_ready, "decoder busy after the frame");
        @(posedge clk);
        #1;
        wait_cycles++;
      end
      check(wait_cycles == L + 1, $sformatf("latency %0d cycles", wait_cycles));
      check(int'(err_count) == $countones(emask) && err_detected == (emask != '0),
            $sformatf("frame %0d: %0d errors reported, %0d present", f, err_count, $countones(emask)));
      got = 0;
      while (out_enable && got < 100) begin
        check(sout == data[got], $sformatf("frame %0d (%0d errors) bit %0d", f, nerr, got));
        got++;
        @(posedge clk);
        #1;
      end
      check(got == DATA_BITS, $sformatf("out_enable lasted %0d cycles", got));
    end
    for (int e = 0; e < 6; e++) $display("frames with %0d injected errors: %0d", e, hist_errors[e]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
