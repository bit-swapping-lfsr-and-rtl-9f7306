// tb_lfsr: self-checking test of lfsr.
// Checks the default 4-cell register (taps c1, c4) and a 5-cell one
// (taps c3, c5) against a bit-history model of the recurrence
// c1(t+1) = XOR of the tapped cells at t, with c_i(t) = c1(t-i+1); checks
// that both visit every non-zero state once per period of 2^W - 1 clocks,
// that `en` low holds the state and that `load` restores the seed.
module tb_lfsr;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load4, en4, load5, en5;
  logic [3:0] s4;
  logic [4:0] s5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr dut4 (.clk, .rst_n, .load(load4), .en(en4), .state(s4));
  lfsr #(.WIDTH(5), .TAPS(5'b10100), .SEED(5'h01)) dut5 (.clk, .rst_n, .load(load5), .en(en5), .state(s5));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist4 [$];
    bit hist5 [$];
    bit seen4 [16];
    bit seen5 [32];
    logic [3:0] exp4;
    logic [4:0] exp5;
    load4 = 0; en4 = 0; load5 = 0; en5 = 0;
    seen4 = '{default: 0}; seen5 = '{default: 0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(s4 == 4'h1 && s5 == 5'h01, "reset loads seed");
    // history, newest first: c1 = hist[0]
    hist4 = '{1'b1, 1'b0, 1'b0, 1'b0};
    hist5 = '{1'b1, 1'b0, 1'b0, 1'b0, 1'b0};
    en4 = 1; en5 = 1;
    for (int t = 0; t < 31; t++) begin
      if (t < 15) begin
        check(!seen4[s4], $sformatf("4-cell state %h repeated early", s4));
        seen4[s4] = 1;
      end
      check(!seen5[s5], $sformatf("5-cell state %h repeated early", s5));
      seen5[s5] = 1;
      for (int i = 0; i < 4; i++) exp4[i] = hist4[i];
      for (int i = 0; i < 5; i++) exp5[i] = hist5[i];
      check(s4 == exp4 || t >= 15, $sformatf("t=%0d 4-cell %h exp %h", t, s4, exp4));
      check(s5 == exp5, $sformatf("t=%0d 5-cell %h exp %h", t, s5, exp5));
      hist4.push_front(hist4[0] ^ hist4[3]);
      hist5.push_front(hist5[2] ^ hist5[4]);
      @(negedge clk);
    end
    check(s5 == 5'h01, "5-cell period is 31");
    check(seen4[0] == 0 && seen5[0] == 0, "all-zero state never reached");
    // run the 4-cell one to a full period from reset-aligned count
    en5 = 0;
    begin
      logic [4:0] held;
      held = s5;
      repeat (3) @(negedge clk);
      check(s5 == held, "en low holds state");
    end
    load4 = 1; @(negedge clk); load4 = 0;
    check(s4 == 4'h1, "load restores seed");
    repeat (15) @(negedge clk);
    check(s4 == 4'h1, "4-cell period is 15");
    repeat (7) @(negedge clk);
    check(s4 != 4'h1, "4-cell not back to seed before period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
