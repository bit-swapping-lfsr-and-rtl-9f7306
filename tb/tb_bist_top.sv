// tb_bist_top: end-to-end test of bist_top at its default parameters.
// For both pattern generators it runs one BIST session fault free and one
// for every single stuck-at fault of the circuit under test (19 lines x 2
// values), alternating the generator between sessions. An independent model
// recomputes the vectors each generator applies (LFSR recurrence, bit swap,
// LT-RTPG AND/T flip-flop and scan shifting) and the faulty and fault-free
// responses, and from them whether the fault must be detected and how many
// compared vectors must mismatch. Also checked: session length in clocks,
// the applied vectors (at each compare, or each scan capture), and that
// every mechanism occurred: both generators, a generator switch, swapped and
// unswapped BS-LFSR vectors, T flip-flop toggles and holds, scan captures
// and scan-out compares, detected and undetected faults.
module tb_bist_top;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  tpg_sel_e mode;
  fault_t [0:0] faults;
  logic busy, done, fault_detected, wof, chain_in, chain_out, bs_swap, lt_toggle;
  logic [0:0] fail, wif;
  logic [3:0] bslf;
  logic [2:0] scan_cells, cut_in;
  logic [15:0] patterns, errors;
  int checks = 0, failures = 0;

  localparam int BS_P = 15, LT_P = 32;

  always #5 clk = ~clk;

  bist_top dut (.clk, .rst_n, .start, .mode, .faults, .busy, .done, .fault_detected,
                .fail, .wof, .wif, .bslf, .bs_swap, .lt_toggle, .chain_in, .scan_cells,
                .chain_out, .cut_in, .patterns, .errors);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- model of the circuit under test -------------------------------
  function automatic logic lv(input logic v, input int site, input fault_t ft);
    return (ft.en && int'(ft.site) == site) ? ft.value : v;
  endfunction

  function automatic logic cut_model(input logic [2:0] xin, input fault_t ft);
    logic w, xx, y, acc;
    logic [7:0] p;
    w = lv(xin[2], 2, ft); xx = lv(xin[1], 1, ft); y = lv(xin[0], 0, ft);
    p[0] = lv(1'b1, 3, ft);      p[1] = lv(y, 4, ft);         p[2] = lv(xx, 5, ft);
    p[3] = lv(xx & y, 6, ft);    p[4] = lv(w, 7, ft);         p[5] = lv(w & y, 8, ft);
    p[6] = lv(w & xx, 9, ft);    p[7] = lv(w & xx & y, 10, ft);
    acc = lv(p[0], 11, ft);
    acc = lv(acc, 12, ft);
    acc = lv(acc ^ p[2], 13, ft);
    acc = lv(acc ^ p[3], 14, ft);
    acc = lv(acc, 15, ft);
    acc = lv(acc ^ p[5], 16, ft);
    acc = lv(acc ^ p[6], 17, ft);
    acc = lv(acc, 18, ft);
    return acc;
  endfunction

  // ---- model of the applied vectors --------------------------------------
  logic [2:0] bs_vec [BS_P];
  logic [2:0] lt_vec [LT_P];
  int lt_toggles = 0, lt_holds = 0;

  function automatic void build_vectors();
    logic [3:0] s4, o4;
    logic [4:0] s5;
    logic t, a;
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
        a = s5[0] & s5[2] & s5[4];
        if (a) begin t = ~t; lt_toggles++; end else lt_holds++;
        s5 = {s5[3:0], s5[2] ^ s5[4]};
      end
      lt_vec[i] = sc;
    end
  endfunction

  // ---- mechanism counters, sampled on compare clocks -----------------
  int n_swap = 0, n_noswap = 0, n_tog = 0, n_hold = 0;
  int n_bs = 0, n_lt = 0, n_switch = 0, n_det = 0, n_undet = 0, n_vec_err = 0;
  int vidx = 0;
  tpg_sel_e cur_mode;

  int n_cap = 0, n_unload_cmp = 0;
  always @(posedge clk) begin
    if (dut.u_ctrl.scan_capture) begin
      n_cap++;
      if (cut_in != lt_vec[vidx % LT_P]) n_vec_err++;
      vidx++;
    end
    if (dut.u_ctrl.ora_en && cur_mode == TPG_LTRTPG) n_unload_cmp++;
    if (dut.u_ctrl.bs_en) begin
      if (bs_swap) n_swap++; else n_noswap++;
    end
    if (dut.u_ctrl.lt_en) begin
      if (lt_toggle) n_tog++; else n_hold++;
    end
    if (dut.u_ctrl.ora_en && cur_mode == TPG_BSLFSR) begin
      if (cut_in != bs_vec[vidx % BS_P]) n_vec_err++;
      vidx++;
    end
  end

  task automatic run_session(input tpg_sel_e m, input fault_t ft);
    int edges, exp_edges, exp_err, np;
    logic [2:0] v;
    exp_err = 0;
    np = (m == TPG_BSLFSR) ? BS_P : LT_P;
    for (int i = 0; i < np; i++) begin
      v = (m == TPG_BSLFSR) ? bs_vec[i] : lt_vec[i];
      if (cut_model(v, ft) != cut_model(v, '0)) exp_err++;
    end
    exp_edges = (m == TPG_BSLFSR) ? 2 + BS_P : 3 + LT_P * 4;
    if (m != cur_mode) n_switch++;
    cur_mode = m;
    vidx = 0;
    faults[0] = ft;
    mode = m;
    start = 1;
    edges = 0;
    do begin
      @(negedge clk);
      start = 0;
      edges++;
    end while (!done && edges < 1000);
    check(edges == exp_edges, $sformatf("session length %0d, expected %0d", edges, exp_edges));
    check(patterns == 16'(np), "pattern count");
    check(fault_detected == (exp_err != 0) && fail[0] == (exp_err != 0),
          $sformatf("mode %0d site %0d s-a-%0d en %0d: detected %0d, expected %0d",
                    m, ft.site, ft.value, ft.en, fault_detected, exp_err != 0));
    check(errors == 16'(exp_err), $sformatf("errors %0d expected %0d", errors, exp_err));
    if (m == TPG_BSLFSR) n_bs++; else n_lt++;
    if (ft.en) begin
      if (exp_err != 0) n_det++; else n_undet++;
    end
  endtask

  initial begin
    fault_t ft;
    int det_bs = 0, det_lt = 0;
    start = 0; mode = TPG_BSLFSR; faults = '0; cur_mode = TPG_BSLFSR;
    build_vectors();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    run_session(TPG_BSLFSR, '0);
    check(!fault_detected, "no fault flagged fault free (BS-LFSR)");
    run_session(TPG_LTRTPG, '0);
    check(!fault_detected, "no fault flagged fault free (LT-RTPG)");
    for (int s = 0; s < 19; s++) begin
      for (int sv = 0; sv < 2; sv++) begin
        ft.en = 1; ft.value = sv[0]; ft.site = SITE_W'(s);
        run_session(TPG_BSLFSR, ft);
        if (fault_detected) det_bs++;
        run_session(TPG_LTRTPG, ft);
        if (fault_detected) det_lt++;
      end
    end
    check(n_vec_err == 0, $sformatf("%0d applied vectors differ from the model", n_vec_err));
    $display("faults detected: BS-LFSR %0d/38, LT-RTPG %0d/38", det_bs, det_lt);
    $display("mechanisms: BS sessions %0d, LT sessions %0d, switches %0d, swapped %0d, unswapped %0d,",
             n_bs, n_lt, n_switch, n_swap, n_noswap);
    $display("            T toggles %0d, T holds %0d, captures %0d, detected %0d, undetected %0d",
             n_tog, n_hold, n_cap, n_det, n_undet);
    check(n_bs > 0 && n_lt > 0 && n_switch > 0, "both generators used and switched");
    check(n_swap > 0 && n_noswap > 0, "BS-LFSR swapped and unswapped vectors");
    check(n_tog > 0 && n_hold > 0, "T flip-flop toggled and held");
    check(n_det > 0 && n_undet > 0, "detected and undetected faults");
    check(n_cap == n_lt * LT_P && n_unload_cmp == n_lt * LT_P,
          $sformatf("captures %0d, scan-out compares %0d", n_cap, n_unload_cmp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
