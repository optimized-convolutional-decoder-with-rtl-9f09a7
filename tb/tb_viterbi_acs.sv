// tb_viterbi_acs: random test of the add-compare-select unit.
//
// Random path and branch metrics (kept clear of overflow, as in the decoder)
// plus forced ties. Checked: the new metric is the smaller sum, the decision
// names the smaller sum, and ties keep the 0 predecessor.
module tb_viterbi_acs;
  localparam int PMW = 8, BMW = 2;
  logic [PMW-1:0] pm0, pm1, pm_new;
  logic [BMW-1:0] bm0, bm1;
  logic dec;
  int checks = 0, failures = 0;

  viterbi_acs #(.PMW(PMW), .BMW(BMW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int s0, s1;
      pm0 = PMW'($urandom % 200);
      pm1 = (i % 5 == 0) ? pm0 : PMW'($urandom % 200);
      bm0 = BMW'($urandom % 4);
      bm1 = (i % 5 == 0) ? bm0 : BMW'($urandom % 4);
      #1;
      s0 = int'(pm0) + int'(bm0);
      s1 = int'(pm1) + int'(bm1);
      checks++;
      if (int'(pm_new) != ((s1 < s0) ? s1 : s0) || dec != (s1 < s0)) begin
        failures++;
        $display("FAIL pm0=%0d bm0=%0d pm1=%0d bm1=%0d -> %0d dec %b", pm0, bm0, pm1, bm1, pm_new, dec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
