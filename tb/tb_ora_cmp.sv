// tb_ora_cmp: self-checking test of ora_cmp with two copies under test.
// Random responses are applied with random `en`; a model keeps the sticky
// per-copy fail bits and the error count. Checks the combinational
// mismatch, the sticky behaviour, that `en` low ignores mismatches and that
// `clear` empties the flags.
module tb_ora_cmp;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, en, ref_resp;
  logic [1:0][0:0] cut_resp;
  logic [1:0] mismatch, fail;
  logic fault;
  logic [15:0] errors;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ora_cmp #(.NCUT(2)) dut (.clk, .rst_n, .clear, .en, .ref_resp, .cut_resp,
                           .mismatch, .fail, .fault, .errors);

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
    logic [1:0] mfail, mm;
    int merr, ignored = 0;
    clear = 0; en = 0; ref_resp = 0; cut_resp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    mfail = 0; merr = 0;
    check(fail == 0 && !fault && errors == 0, "reset state");
    for (int t = 0; t < 300; t++) begin
      en = ($urandom_range(1) == 1);
      clear = ($urandom_range(49) == 0);
      ref_resp = $urandom_range(1);
      // copy 0 mostly agrees, copy 1 disagrees now and then
      cut_resp[0] = ref_resp ^ ($urandom_range(19) == 0);
      cut_resp[1] = ref_resp ^ ($urandom_range(5) == 0);
      #1;
      mm = {cut_resp[1][0] != ref_resp, cut_resp[0][0] != ref_resp};
      check(mismatch == mm, "mismatch");
      if (clear) begin mfail = 0; merr = 0; end
      else if (en) begin mfail |= mm; if (mm != 0) merr++; end
      else if (mm != 0) ignored++;
      @(negedge clk);
      check(fail == mfail, $sformatf("t=%0d fail %b exp %b", t, fail, mfail));
      check(fault == (mfail != 0), "fault flag");
      check(errors == 16'(merr), $sformatf("errors %0d exp %0d", errors, merr));
    end
    check(ignored > 0, "mismatches with en low seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
