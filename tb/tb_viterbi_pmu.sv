// tb_viterbi_pmu: self-checking test of the path metric unit (16 states).
//
// A reference trellis is built here from the encoder equations
// (S2 = u^M3^M2^M1^M0, S1 = u^M3^M1^M0, S0 = u^M2^M0, next state
// {u, M3, M2, M1}) and run in parallel with the unit on random received
// symbols, with random enable gaps and a clear every 20 symbols. Branch
// metrics are fed as Hamming distances computed here. Checked after every
// step: all 16 path metrics and the 16 decisions of that step.
module tb_viterbi_pmu;
  localparam int NS = 16, PMW = 8;

  logic clk = 0, reset = 1, clear = 0, en = 0;
  logic [1:0] bm [8];
  logic [PMW-1:0] pm [NS];
  logic [NS-1:0] dec;
  int checks = 0, failures = 0;

  viterbi_pmu #(.PMW(PMW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_pm [NS];
  int nxt [NS];
  logic [NS-1:0] ref_dec;

  function automatic logic [2:0] cw(input int u, input int s);
    logic m3, m2, m1, m0;
    m3 = s[3]; m2 = s[2]; m1 = s[1]; m0 = s[0];
    return {1'(u ^ m3 ^ m2 ^ m1 ^ m0), 1'(u ^ m3 ^ m1 ^ m0), 1'(u ^ m2 ^ m0)};
  endfunction

  function automatic int hd(input logic [2:0] a, input logic [2:0] b);
    return $countones(a ^ b);
  endfunction

  task automatic ref_clear();
    for (int s = 0; s < NS; s++) ref_pm[s] = (s == 0) ? 0 : 128;
  endtask

  initial begin
    logic [2:0] rx;
    ref_clear();
    repeat (2) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    #1;
    for (int t = 0; t < 400; t++) begin
      rx = 3'($urandom);
      for (int c = 0; c < 8; c++) bm[c] = 2'(hd(rx, 3'(c)));
      clear = (t % 20 == 19);
      en = ($urandom % 4 != 0);
      // reference step
      for (int s = 0; s < NS; s++) nxt[s] = 1 << 30;
      ref_dec = '0;
      for (int ns = 0; ns < NS; ns++) begin
        int u, p0, p1, a, b;
        u  = ns >> 3;
        p0 = ((ns << 1) & 15);
        p1 = p0 | 1;
        a  = ref_pm[p0] + hd(rx, cw(u, p0));
        b  = ref_pm[p1] + hd(rx, cw(u, p1));
        nxt[ns] = (b < a) ? b : a;
        ref_dec[ns] = (b < a);
      end
      #1;
      if (en && !clear) begin
        checks++;
        if (dec !== ref_dec) begin
          failures++;
          $display("FAIL decisions t=%0d got %h exp %h", t, dec, ref_dec);
        end
      end
      @(posedge clk);
      #1;
      if (clear) ref_clear();
      else if (en) for (int s = 0; s < NS; s++) ref_pm[s] = nxt[s];
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (int'(pm[s]) != ref_pm[s]) begin
          failures++;
          $display("FAIL pm[%0d] t=%0d got %0d exp %0d", s, t, pm[s], ref_pm[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
