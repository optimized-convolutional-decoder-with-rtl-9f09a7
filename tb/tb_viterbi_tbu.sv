// tb_viterbi_tbu: self-checking test of the survivor memory and trace-back.
//
// For each frame a random 16-bit data word plus four zero tail bits is
// turned into its state sequence (state {M3..M0}, new bit at the top). The
// decision word of step t has, at the state reached after step t, the bit
// that was shifted out of that state's predecessor; all other decision bits
// are random, so only a correct trace along the decisions recovers the data.
// Decision words are written with random gaps. Checked: the 16 output bits
// in order, out_enable exactly 16 cycles long, ready low from the last write
// until the output ends, and the first bit 21 cycles (L+1) after the last
// write.
module tb_viterbi_tbu;
  localparam int M = 4, NS = 16, DATA_BITS = 16, L = DATA_BITS + M;

  logic clk = 0, reset = 1;
  logic [NS-1:0] dec = '0;
  logic dec_valid = 0, ready, sout, out_enable;
  int checks = 0, failures = 0;

  viterbi_tbu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #300000;
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

  initial begin
    logic [L-1:0] data;
    logic [M-1:0] st [L+1];
    repeat (2) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    #1;
    for (int f = 0; f < 30; f++) begin
      int gap_cycles, got, wait_cycles;
      data = '0;
      for (int i = 0; i < DATA_BITS; i++) data[i] = 1'($urandom);
      st[0] = '0;
      for (int t = 0; t < L; t++) st[t+1] = {data[t], st[t][M-1:1]};
      check(st[L] == '0, "tail returns to state 0");
      for (int t = 0; t < L; t++) begin
        logic [NS-1:0] w;
        w = NS'($urandom);
        w[st[t+1]] = st[t][0];
        while (f > 4 && $urandom % 3 == 0) begin
          dec_valid = 0;
          @(posedge clk);
          #1;
        end
        check(ready, "ready while filling");
        dec = w;
        dec_valid = 1;
        @(posedge clk);
        #1;
      end
      dec_valid = 0;
      wait_cycles = 1;
      while (!out_enable && wait_cycles < 200) begin
        check(!ready, "not ready during trace-back");
        @(posedge clk);
        #1;
        wait_cycles++;
      end
      check(wait_cycles == L + 1, $sformatf("first output %0d cycles after last write", wait_cycles));
      got = 0;
      while (out_enable && got < 100) begin
        check(sout == data[got], $sformatf("frame %0d bit %0d", f, got));
        check(!ready, "not ready while sending");
        got++;
        @(posedge clk);
        #1;
      end
      check(got == DATA_BITS, $sformatf("out_enable lasted %0d cycles", got));
      check(ready, "ready again after the frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
