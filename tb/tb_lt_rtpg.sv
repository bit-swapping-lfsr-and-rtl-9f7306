// tb_lt_rtpg: self-checking test of lt_rtpg.
// Default instance: R = 5, K = 3, AND of stages 1, 3, 5. Second instance:
// K = 2 on stages 2 and 4 with stage 4 inverted. An independent model steps
// the LFSR recurrence, forms the AND and toggles a model T flip-flop; every
// clock the chain input and AND output are compared. Over a full LFSR
// period the number of toggles must equal the number of LFSR states whose
// selected stages match (4 of 31 for K = 3, 8 of 31 for K = 2), so the
// chain input changes far less often than an LFSR bit.
module tb_lt_rtpg;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, en;
  logic ci3, tg3, ci2, tg2;
  logic [4:0] s3, s2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lt_rtpg dut3 (.clk, .rst_n, .load, .en, .chain_in(ci3), .toggle(tg3), .lfsr_state(s3));
  lt_rtpg #(.K(2), .AND_STAGES(16'h04_02), .AND_INV(2'b10)) dut2 (
    .clk, .rst_n, .load, .en, .chain_in(ci2), .toggle(tg2), .lfsr_state(s2));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] m;
    logic t3, t2, a3, a2;
    int n3 = 0, n2 = 0, holds = 0;
    load = 0; en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    m = 5'h01; t3 = 0; t2 = 0;
    en = 1;
    for (int t = 0; t < 62; t++) begin
      a3 = m[0] & m[2] & m[4];
      a2 = m[1] & ~m[3];
      check(s3 == m && s2 == m, $sformatf("t=%0d lfsr %h exp %h", t, s3, m));
      check(tg3 == a3 && tg2 == a2, $sformatf("t=%0d AND outputs", t));
      check(ci3 == t3 && ci2 == t2, $sformatf("t=%0d chain_in %b/%b exp %b/%b", t, ci3, ci2, t3, t2));
      if (t < 31) begin
        if (a3) n3++; else holds++;
        if (a2) n2++;
      end
      if (a3) t3 = ~t3;
      if (a2) t2 = ~t2;
      m = {m[3:0], m[2] ^ m[4]};
      @(negedge clk);
    end
    check(n3 == 4, $sformatf("K=3 toggles per period %0d, expected 4", n3));
    check(n2 == 8, $sformatf("K=2 toggles per period %0d, expected 8", n2));
    check(holds > 0, "T flip-flop holds");
    // en low: nothing moves
    en = 0;
    begin
      logic c; logic [4:0] s;
      c = ci3; s = s3;
      repeat (4) @(negedge clk);
      check(ci3 == c && s3 == s, "en low holds");
    end
    load = 1; @(negedge clk); load = 0;
    check(s3 == 5'h01 && ci3 == 1'b0, "load reseeds and clears T");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
