// tb_conv_encoder: self-checking test of the rate-1/3 encoder.
//
// A reference shift register m3..m0, written out from the three output
// equations S2 = S_in^M3^M2^M1^M0, S1 = S_in^M3^M1^M0, S0 = S_in^M2^M0,
// follows every accepted step. Random data, random in_valid gaps and random
// out_ready stalls are applied over several frames. Checked: every symbol,
// sym_last on step DATA_BITS+3 of a frame, in_ready low for exactly the four
// tail steps, the register back at zero after each frame, and one symbol per
// cycle when nothing stalls (a frame of 20 symbols in 20 cycles).
// A second instance, built for the textbook rate-1/2 code with two
// flip-flops and generators 111 / 101, is checked against all eight rows of
// that code's state table (input, present state -> next state, output).
module tb_conv_encoder;
  localparam int DATA_BITS = 16;
  localparam int L = DATA_BITS + 4;

  logic clk = 0, reset = 1;
  logic in_bit = 0, in_valid = 0, out_ready = 0;
  logic in_ready, sym_valid, sym_last;
  logic [2:0] sym;
  int checks = 0, failures = 0;
  int cyc = 0;

  conv_encoder dut (.*);

  // textbook rate-1/2 encoder
  logic ex_bit = 0, ex_valid = 0, ex_in_ready, ex_sym_valid, ex_sym_last;
  logic [1:0] ex_sym;
  conv_encoder #(.N(2), .M(2), .GEN({3'b111, 3'b101}), .DATA_BITS(8)) u_ex (
    .clk, .reset, .in_bit(ex_bit), .in_valid(ex_valid), .in_ready(ex_in_ready),
    .sym(ex_sym), .sym_valid(ex_sym_valid), .sym_last(ex_sym_last), .out_ready(1'b1));

  // state table rows: input, present state, next state, output
  typedef struct packed {
    logic       u;
    logic [1:0] ps;
    logic [1:0] ns;
    logic [1:0] out;
  } row_t;
  localparam row_t TABLE [8] = '{
    '{1'b0, 2'b00, 2'b00, 2'b00}, '{1'b1, 2'b00, 2'b10, 2'b11},
    '{1'b0, 2'b10, 2'b01, 2'b10}, '{1'b1, 2'b10, 2'b11, 2'b01},
    '{1'b0, 2'b01, 2'b00, 2'b11}, '{1'b1, 2'b01, 2'b10, 2'b00},
    '{1'b0, 2'b11, 2'b01, 2'b01}, '{1'b1, 2'b11, 2'b11, 2'b10}};

  task automatic ex_push(input logic b);
    ex_bit = b;
    ex_valid = 1;
    @(posedge clk);
    #1;
    ex_valid = 0;
  endtask

  task automatic check_table();
    foreach (TABLE[r]) begin
      reset = 1;
      @(posedge clk);
      #1;
      reset = 0;
      // reach the present state: the newest bit is the left state bit
      if (TABLE[r].ps == 2'b10) ex_push(1);
      if (TABLE[r].ps == 2'b01) begin ex_push(1); ex_push(0); end
      if (TABLE[r].ps == 2'b11) begin ex_push(1); ex_push(1); end
      check(u_ex.sreg == TABLE[r].ps, $sformatf("table row %0d present state", r));
      ex_bit = TABLE[r].u;
      ex_valid = 1;
      #1;
      check(ex_sym_valid && ex_sym == TABLE[r].out, $sformatf("table row %0d output %b", r, ex_sym));
      @(posedge clk);
      #1;
      ex_valid = 0;
      check(u_ex.sreg == TABLE[r].ns, $sformatf("table row %0d next state", r));
    end
  endtask

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  logic m3, m2, m1, m0;
  int step;

  task automatic run_frame(input bit stalls);
    int iters;
    step = 0;
    iters = 0;
    while (step < L) begin
      iters++;
      in_bit    = 1'($urandom);
      in_valid  = stalls ? ($urandom % 4 != 0) : 1'b1;
      out_ready = stalls ? ($urandom % 4 != 0) : 1'b1;
      #1;
      @(negedge clk);
      if (sym_valid && out_ready) begin
        logic u;
        logic [2:0] exp_sym;
        u = (step < DATA_BITS) ? in_bit : 1'b0;
        exp_sym = {u ^ m3 ^ m2 ^ m1 ^ m0, u ^ m3 ^ m1 ^ m0, u ^ m2 ^ m0};
        check(sym == exp_sym, $sformatf("symbol step %0d got %b exp %b", step, sym, exp_sym));
        check(sym_last == (step == L - 1), "sym_last");
        check(in_ready == (step < DATA_BITS), "in_ready during data/tail");
        @(posedge clk);
        #1;
        {m3, m2, m1, m0} = {u, m3, m2, m1};
        step++;
      end else begin
        @(posedge clk);
        #1;
      end
    end
    check({m3, m2, m1, m0} == 4'b0, "reference register flushed by tail");
    check(dut.sreg == 4'b0, "encoder register flushed by tail");
    if (!stalls) check(iters == L, $sformatf("frame took %0d cycles", iters));
    in_valid  = 0;
    out_ready = 0;
  endtask

  initial begin
    {m3, m2, m1, m0} = 4'b0;
    check_table();
    reset = 1;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    #1;
    run_frame(0);
    for (int f = 0; f < 20; f++) run_frame(f % 2 == 0);
    run_frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
