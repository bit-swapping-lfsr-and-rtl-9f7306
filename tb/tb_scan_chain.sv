// tb_scan_chain: self-checking test of scan_chain (LEN = 3 default and
// LEN = 5). Random shift, capture and hold cycles with random serial and
// parallel data are compared with a model; shift has priority over capture.
module tb_scan_chain;
  logic clk = 1'b0, rst_n = 1'b0;
  logic shift, capture, si;
  logic [4:0] d;
  logic [2:0] q3;
  logic [4:0] q5;
  logic so3, so5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_chain dut3 (.clk, .rst_n, .shift, .capture, .si, .d(d[2:0]), .q(q3), .so(so3));
  scan_chain #(.LEN(5)) dut5 (.clk, .rst_n, .shift, .capture, .si, .d(d), .q(q5), .so(so5));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] m3;
    logic [4:0] m5;
    int holds = 0, caps = 0;
    shift = 0; capture = 0; si = 0; d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    m3 = '0; m5 = '0;
    check(q3 == 0 && q5 == 0, "reset clears the chain");
    for (int t = 0; t < 300; t++) begin
      shift   = ($urandom_range(3) != 0);
      capture = ($urandom_range(3) == 0);
      si      = $urandom_range(1);
      d       = 5'($urandom_range(31));
      @(negedge clk);
      if (shift) begin
        m3 = {m3[1:0], si};
        m5 = {m5[3:0], si};
      end else if (capture) begin
        m3 = d[2:0]; m5 = d; caps++;
      end else holds++;
      check(q3 == m3, $sformatf("t=%0d LEN=3 q %b exp %b", t, q3, m3));
      check(q5 == m5, $sformatf("t=%0d LEN=5 q %b exp %b", t, q5, m5));
      check(so3 == m3[2] && so5 == m5[4], "serial outputs");
    end
    check(holds > 0 && caps > 0, "hold and capture cycles exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
