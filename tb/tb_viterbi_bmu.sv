// tb_viterbi_bmu: exhaustive test of the branch metric unit.
//
// For every 3-bit received symbol and every 3-bit code word the metric must
// be the number of differing bits, counted here bit by bit.
module tb_viterbi_bmu;
  logic [2:0] rx_sym;
  logic [1:0] bm [8];
  int checks = 0, failures = 0;

  viterbi_bmu dut (.rx_sym, .bm);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      rx_sym = 3'(r);
      #1;
      for (int c = 0; c < 8; c++) begin
        int d;
        d = (r[0] != c[0]) + (r[1] != c[1]) + (r[2] != c[2]);
        checks++;
        if (int'(bm[c]) != d) begin
          failures++;
          $display("FAIL rx=%0d cw=%0d got %0d exp %0d", r, c, bm[c], d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
