// tb_bs_lfsr: self-checking test of bs_lfsr at N = 4 (default), 5 and 7.
// An independent model steps the LFSR recurrence and applies the swap rule
// (c_N = 0 exchanges c1/c2, c3/c4, ... up to c(N-2)/c(N-1)). Over one
// period it checks every output vector, the number of ones on every output
// (equal to the LFSR's), that the outputs cover every non-zero vector
// exactly once (same test set as the plain LFSR), that both swap settings
// occur, and that the BS-LFSR makes fewer bit transitions
// than the LFSR (cyclic count over the period). A 7-cell instance with the
// select moved to cell 3 checks the general arrangement.
module tb_bs_lfsr;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, en;
  logic [3:0] p4, st4;
  logic [4:0] p5, st5;
  logic sw4, sw5, sw7;
  logic [6:0] p7, st7;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bs_lfsr dut4 (.clk, .rst_n, .load, .en, .pattern(p4), .lfsr_state(st4), .swap(sw4));
  bs_lfsr #(.N(5), .TAPS(5'b10100), .SEED(5'h01)) dut5 (.clk, .rst_n, .load, .en, .pattern(p5), .lfsr_state(st5), .swap(sw5));

  // N = 7 with the select on cell 3: pairs (c1,c2) and (c5,c6) swap,
  // (c3,c4) holds the select cell and stays put
  bs_lfsr #(.N(7), .TAPS(7'b1000001), .SEED(7'h01), .SEL_CELL(3)) dut7 (
    .clk, .rst_n, .load, .en, .pattern(p7), .lfsr_state(st7), .swap(sw7));

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

  function automatic int popc(input logic [7:0] v);
    int c = 0;
    for (int i = 0; i < 8; i++) c += v[i];
    return c;
  endfunction

  initial begin
    logic [3:0] m4, e4, first_s4, first_e4, prev_s4, prev_e4;
    logic [4:0] m5, e5, first_s5, first_e5, prev_s5, prev_e5;
    bit seen4 [16];
    bit seen5 [32];
    bit seen7 [128];
    logic [6:0] m7, e7;
    int ones4 [4];
    int ones5 [5];
    int tr_l4 = 0, tr_b4 = 0, tr_l5 = 0, tr_b5 = 0, swaps = 0, noswaps = 0;
    load = 0; en = 0;
    seen4 = '{default: 0}; seen5 = '{default: 0}; seen7 = '{default: 0};
    ones4 = '{default: 0}; ones5 = '{default: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    m4 = 4'h1; m5 = 5'h01; m7 = 7'h01;
    en = 1;
    for (int t = 0; t < 127; t++) begin
      e7 = m7;
      if (!m7[2]) begin e7[0] = m7[1]; e7[1] = m7[0]; e7[4] = m7[5]; e7[5] = m7[4]; end
      check(p7 == e7 && sw7 == !m7[2], $sformatf("N=7 t=%0d out %h exp %h", t, p7, e7));
      check(!seen7[p7], $sformatf("N=7 vector %h repeated", p7));
      seen7[p7] = 1;
      m7 = {m7[5:0], m7[0] ^ m7[6]};
      if (t >= 31) begin @(negedge clk); continue; end
      // expected outputs from the model state
      e4 = m4;
      if (!m4[3]) begin e4[0] = m4[1]; e4[1] = m4[0]; end
      e5 = m5;
      if (!m5[4]) begin e5[0] = m5[1]; e5[1] = m5[0]; e5[2] = m5[3]; e5[3] = m5[2]; end
      if (t < 15) begin
        check(st4 == m4 && p4 == e4, $sformatf("N=4 t=%0d out %h exp %h", t, p4, e4));
        check(sw4 == !m4[3], "N=4 swap flag");
        check(!seen4[p4], $sformatf("N=4 vector %h repeated", p4));
        seen4[p4] = 1;
        for (int b = 0; b < 4; b++) ones4[b] += p4[b];
        if (sw4) swaps++; else noswaps++;
        if (t == 0) begin first_s4 = m4; first_e4 = e4; end
        else begin tr_l4 += popc(8'(m4 ^ prev_s4)); tr_b4 += popc(8'(e4 ^ prev_e4)); end
        prev_s4 = m4; prev_e4 = e4;
      end
      check(st5 == m5 && p5 == e5, $sformatf("N=5 t=%0d out %h exp %h", t, p5, e5));
      check(!seen5[p5], $sformatf("N=5 vector %h repeated", p5));
      seen5[p5] = 1;
      for (int b = 0; b < 5; b++) ones5[b] += p5[b];
      if (t == 0) begin first_s5 = m5; first_e5 = e5; end
      else begin tr_l5 += popc(8'(m5 ^ prev_s5)); tr_b5 += popc(8'(e5 ^ prev_e5)); end
      prev_s5 = m5; prev_e5 = e5;
      // advance the model
      m4 = {m4[2:0], m4[0] ^ m4[3]};
      m5 = {m5[3:0], m5[2] ^ m5[4]};
      @(negedge clk);
    end
    tr_l4 += popc(8'(first_s4 ^ prev_s4)); tr_b4 += popc(8'(first_e4 ^ prev_e4));
    tr_l5 += popc(8'(first_s5 ^ prev_s5)); tr_b5 += popc(8'(first_e5 ^ prev_e5));
    for (int v = 1; v < 16; v++) check(seen4[v], $sformatf("N=4 vector %h missing", v));
    for (int v = 1; v < 32; v++) check(seen5[v], $sformatf("N=5 vector %h missing", v));
    for (int v = 1; v < 128; v++) check(seen7[v], $sformatf("N=7 vector %h missing", v));
    // every output carries 2^(N-1) ones and 2^(N-1)-1 zeros per period
    for (int b = 0; b < 4; b++) check(ones4[b] == 8, $sformatf("N=4 O%0d ones %0d", b + 1, ones4[b]));
    for (int b = 0; b < 5; b++) check(ones5[b] == 16, $sformatf("N=5 O%0d ones %0d", b + 1, ones5[b]));
    check(swaps > 0 && noswaps > 0, "both swap settings occur");
    $display("transitions per period: N=4 LFSR %0d BS-LFSR %0d; N=5 LFSR %0d BS-LFSR %0d",
             tr_l4, tr_b4, tr_l5, tr_b5);
    check(tr_b4 < tr_l4 && tr_b5 < tr_l5, "BS-LFSR has fewer transitions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
