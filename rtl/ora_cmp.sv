// ora_cmp: comparator-based output response analyzer.
//
// The same test vectors go to a reference copy of the circuit and to the
// copies under test; the analyzer compares each copy's response with the
// reference whenever `en` is high. A mismatch sets that copy's bit in the
// sticky `fail` vector, which stays set until `clear`; `fault` is high
// while any bit of `fail` is set, and `mismatch` shows the comparison of
// the current cycle. Keeping one fail bit per copy locates the faulty copy,
// which is the diagnosis step. The comparator ORA follows the document; the
// sticky flag, the per-copy fail bits and the error counter are this
// design's choices.
//
// Timing: comparison is combinational, `fail` and `errors` update on the
// clock edge at which `en` is high. `clear` (synchronous) and reset empty
// them.
module ora_cmp #(
  parameter int unsigned NCUT = 1,   // copies under test
  parameter int unsigned W    = 1,   // response width of one copy
  parameter int unsigned CW   = 16   // error counter width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 en,
  input  logic [W-1:0]         ref_resp,
  input  logic [NCUT-1:0][W-1:0] cut_resp,
  output logic [NCUT-1:0]      mismatch,
  output logic [NCUT-1:0]      fail,
  output logic                 fault,
  output logic [CW-1:0]        errors
);

  always_comb begin
    for (int unsigned c = 0; c < NCUT; c++) mismatch[c] = (cut_resp[c] != ref_resp);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail   <= '0;
      errors <= '0;
    end else if (clear) begin
      fail   <= '0;
      errors <= '0;
    end else if (en) begin
      fail <= fail | mismatch;
      if (|mismatch && errors != '1) errors <= errors + 1'b1;
    end
  end

  assign fault = |fail;

endmodule
