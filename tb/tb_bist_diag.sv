// tb_bist_diag: fault location with several copies under test.
// bist_top is built with NCUT = 3 copies of the Reed-Muller circuit fed by
// the same vectors. Random single stuck-at faults are injected into random
// subsets of the copies; after each session (both generators alternately)
// the per-copy fail vector must name exactly the copies whose fault changes
// the response to at least one applied vector, which an independent model
// of the vectors and of the circuit works out.
module tb_bist_diag;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  tpg_sel_e mode;
  fault_t [2:0] faults;
  logic busy, done, fault_detected, wof, chain_in, chain_out, bs_swap, lt_toggle;
  logic [2:0] fail, wif;
  logic [3:0] bslf;
  logic [2:0] scan_cells, cut_in;
  logic [15:0] patterns, errors;
  int checks = 0, failures = 0;

  localparam int BS_P = 15, LT_P = 32;

  always #5 clk = ~clk;

  bist_top #(.NCUT(3)) dut (.clk, .rst_n, .start, .mode, .faults, .busy, .done, .fault_detected,
                .fail, .wof, .wif, .bslf, .bs_swap, .lt_toggle, .chain_in, .scan_cells,
                .chain_out, .cut_in, .patterns, .errors);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // truth table of the circuit with a fault, from the expansion
  // 1 ^ X ^ XY ^ WY ^ WX evaluated term by term (chain order of rm_cut)
  function automatic logic lv(input logic v, input int site, input fault_t ft);
    return (ft.en && int'(ft.site) == site) ? ft.value : v;
  endfunction

  function automatic logic cut_model(input logic [2:0] xin, input fault_t ft);
    logic w, xx, y, acc;
    w = lv(xin[2], 2, ft); xx = lv(xin[1], 1, ft); y = lv(xin[0], 0, ft);
    acc = lv(lv(lv(1'b1, 3, ft), 11, ft), 12, ft);
    acc = lv(acc ^ lv(xx, 5, ft), 13, ft);
    acc = lv(acc ^ lv(xx & y, 6, ft), 14, ft);
    acc = lv(acc, 15, ft);
    acc = lv(acc ^ lv(w & y, 8, ft), 16, ft);
    acc = lv(acc ^ lv(w & xx, 9, ft), 17, ft);
    return lv(acc, 18, ft);
  endfunction

  logic [2:0] bs_vec [BS_P];
  logic [2:0] lt_vec [LT_P];

  function automatic void build_vectors();
    logic [3:0] s4, o4;
    logic [4:0] s5;
    logic t;
    logic [2:0] sc;
    s4 = 4'h1;
    for (int i = 0; i < BS_P; i++) begin
      o4 = s4;
      if (!s4[3]) begin o4[0] = s4[1]; o4[1] = s4[0]; end
      bs_vec[i] = o4[2:0];
      s4 = {s4[2:0], s4[0] ^ s4[3]};
    end
    s5 = 5'h01; t = 0; sc = '0;
    for (int i = 0; i < LT_P; i++) begin
      for (int k = 0; k < 3; k++) begin
        sc = {sc[1:0], t};
        if (s5[0] & s5[2] & s5[4]) t = ~t;
        s5 = {s5[3:0], s5[2] ^ s5[4]};
      end
      lt_vec[i] = sc;
    end
  endfunction

  initial begin
    int multi = 0, none = 0;
    start = 0; mode = TPG_BSLFSR; faults = '0;
    build_vectors();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 60; s++) begin
      logic [2:0] exp_fail;
      int edges;
      mode = (s % 2 == 0) ? TPG_BSLFSR : TPG_LTRTPG;
      for (int c = 0; c < 3; c++) begin
        faults[c].en    = ($urandom_range(1) == 1);
        faults[c].value = 1'($urandom_range(1));
        faults[c].site  = SITE_W'($urandom_range(18));
      end
      exp_fail = '0;
      for (int c = 0; c < 3; c++) begin
        for (int i = 0; i < ((mode == TPG_BSLFSR) ? BS_P : LT_P); i++) begin
          logic [2:0] v;
          v = (mode == TPG_BSLFSR) ? bs_vec[i] : lt_vec[i];
          if (cut_model(v, faults[c]) != cut_model(v, '0)) exp_fail[c] = 1'b1;
        end
      end
      start = 1;
      edges = 0;
      do begin
        @(negedge clk);
        start = 0;
        edges++;
      end while (!done && edges < 1000);
      check(done, "session ended");
      check(fail == exp_fail, $sformatf("session %0d: fail %b expected %b", s, fail, exp_fail));
      check(fault_detected == (exp_fail != 0), "fault flag");
      if ($countones(exp_fail) > 1) multi++;
      if (exp_fail == 0) none++;
    end
    $display("sessions with several failing copies %0d, with none %0d", multi, none);
    check(multi > 0 && none > 0, "several and no failing copies both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
