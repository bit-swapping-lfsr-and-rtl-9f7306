// lt_rtpg: low-transition random test pattern generator for test-per-scan
// BIST.
//
// An R-stage LFSR feeds a K-input AND gate; each AND input is one LFSR
// stage, taken straight or inverted. The AND output drives the T input of a
// toggle flip-flop whose output is the scan chain input. The flip-flop keeps
// its value while the AND output is 0, so the same bit is shifted into the
// chain for several clocks in a row and neighbouring scan cells mostly hold
// equal values: far fewer transitions at the scan input than with an LFSR
// bit directly. With K inputs the flip-flop toggles on average once every
// 2^K clocks.
//
// From the document: the structure (LFSR, K-input AND on true or inverted
// stages, T flip-flop) and K = 2 or 3 (K = 3 is the default here). This
// design's own choices: R = 5, the LFSR taps (x^5+x^3+1, maximal length),
// the AND inputs on stages 1, 3 and 5 (AND_STAGES, 1-based, packed 8 bits per
// input) with none inverted (AND_INV), and the T flip-flop reset to 0.
//
// Timing: with `en` high the LFSR advances and the flip-flop toggles if the
// AND of the current LFSR stages is 1; chain_in is registered. `load`
// reseeds the LFSR and clears the flip-flop.
module lt_rtpg #(
  parameter int unsigned       R          = 5,
  parameter int unsigned       K          = 3,
  parameter logic [R-1:0]      TAPS       = R'(5'b10100),
  parameter logic [R-1:0]      SEED       = R'(1),
  parameter logic [8*K-1:0]    AND_STAGES = (8*K)'(24'h05_03_01),
  parameter logic [K-1:0]      AND_INV    = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic         chain_in,    // T flip-flop output, to the scan chain
  output logic         toggle,      // AND gate output (T input)
  output logic [R-1:0] lfsr_state
);

  logic [K-1:0] and_in;

  // 0-based LFSR index of AND input k
  function automatic int unsigned stage_idx(input int unsigned k);
    return int'(AND_STAGES[8*k +: 8]) - 1;
  endfunction

  lfsr #(.WIDTH(R), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .en    (en),
    .state (lfsr_state)
  );

  always_comb begin
    for (int unsigned k = 0; k < K; k++) begin
      and_in[k] = lfsr_state[stage_idx(k)] ^ AND_INV[k];
    end
  end

  assign toggle = &and_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               chain_in <= 1'b0;
    else if (load)            chain_in <= 1'b0;
    else if (en && toggle)    chain_in <= ~chain_in;
  end

endmodule
