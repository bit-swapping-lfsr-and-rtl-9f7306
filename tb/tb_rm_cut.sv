// tb_rm_cut: self-checking test of rm_cut.
// 1. The coefficients derived from the truth table of
//    f = WX + W'Y + X'Y' must be those of 1 ^ X ^ WX ^ WY ^ XY.
// 2. Fault free, the circuit must equal f on all 8 inputs; a second
//    instance built from a random-looking table (8'hE8, majority) must
//    equal that table.
// 3. Every single stuck-at fault (19 lines x 2 values) is compared on all 8
//    inputs with a hand-written model of the AND/XOR network
//    (chain order: 1, X, XY, WY, WX). Faults on lines that exist must be
//    detected by at least one input vector; 29 of the 38 are detectable.
module tb_rm_cut;
  import bist_pkg::*;
  logic [2:0] x;
  fault_t flt, nof;
  logic f, fm;
  int checks = 0, failures = 0;

  rm_cut dut (.x, .fault(flt), .f);
  rm_cut #(.TRUTH(8'hE8)) dutm (.x, .fault(nof), .f(fm));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: line values with the fault applied
  function automatic logic lv(input logic v, input int site, input fault_t ft);
    return (ft.en && int'(ft.site) == site) ? ft.value : v;
  endfunction

  function automatic logic model(input logic [2:0] xin, input fault_t ft);
    logic w, xx, y, acc;
    logic [7:0] p;
    w = lv(xin[2], 2, ft); xx = lv(xin[1], 1, ft); y = lv(xin[0], 0, ft);
    p[0] = lv(1'b1, 3, ft);      p[1] = lv(y, 4, ft);         p[2] = lv(xx, 5, ft);
    p[3] = lv(xx & y, 6, ft);    p[4] = lv(w, 7, ft);         p[5] = lv(w & y, 8, ft);
    p[6] = lv(w & xx, 9, ft);    p[7] = lv(w & xx & y, 10, ft);
    acc = lv(p[0], 11, ft);          // 1
    acc = lv(acc, 12, ft);           // Y term absent
    acc = lv(acc ^ p[2], 13, ft);    // ^ X
    acc = lv(acc ^ p[3], 14, ft);    // ^ XY
    acc = lv(acc, 15, ft);           // W term absent
    acc = lv(acc ^ p[5], 16, ft);    // ^ WY
    acc = lv(acc ^ p[6], 17, ft);    // ^ WX
    acc = lv(acc, 18, ft);           // WXY term absent
    return acc;
  endfunction

  initial begin
    logic [31:0] c;
    int detected_faults = 0, undetectable = 0;
    nof = '0;
    c = rm_coeff(32'hDB, 3);
    check(c[7:0] == 8'b0110_1101, $sformatf("coefficients %b", c[7:0]));
    flt = '0;
    for (int v = 0; v < 8; v++) begin
      logic W, X, Y;
      x = 3'(v); {W, X, Y} = x;
      #1;
      check(f == ((W & X) | (~W & Y) | (~X & ~Y)), $sformatf("fault-free f(%b)", x));
      check(fm == ((W & X) | (W & Y) | (X & Y)), $sformatf("majority f(%b)", x));
    end
    for (int s = 0; s < 19; s++) begin
      for (int sv = 0; sv < 2; sv++) begin
        bit det;
        det = 0;
        flt.en = 1; flt.value = sv[0]; flt.site = SITE_W'(s);
        for (int v = 0; v < 8; v++) begin
          x = 3'(v);
          #1;
          check(f == model(x, flt), $sformatf("site %0d s-a-%0d x=%b f=%b", s, sv, x, f));
          if (f != model(x, '0)) det = 1;
        end
        if (det) detected_faults++; else undetectable++;
        // lines that carry a real signal: inputs, constant, X/Y branches, ANDs used, chain nodes
        if (s inside {[0:3], 5, 6, 8, 9, [11:18]} && !(s inside {3, 11, 12} && sv == 1))
          check(det, $sformatf("fault site %0d s-a-%0d not detectable", s, sv));
      end
    end
    $display("single stuck-at faults detectable by exhaustive test: %0d, not: %0d",
             detected_faults, undetectable);
    // undetectable: the constant-1 line and the chain nodes equal to it
    // stuck at 1, and the unused Y, W and WXY terms
    check(detected_faults == 29, "29 of 38 faults detectable");
    // undetectable: the constant-1 line and the chain nodes equal to it
    // stuck at 1, and the unused Y, W and WXY terms
    check(detected_faults == 29, "29 of 38 faults detectable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
