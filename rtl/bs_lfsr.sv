// bs_lfsr: bit swapping LFSR, a low-transition test pattern generator.
//
// A conventional LFSR (cells c1..cN) is followed by a row of 2x1
// multiplexers. The last cell cN drives the select line of every
// multiplexer; under its control c1 is exchanged with c2, c3 with c4, and so
// on, pair by pair, up to c(N-2)/c(N-1). A cell left without a partner
// (c3 when N = 4) and cN itself are passed through unchanged. Because the
// swap is decided by cN, which is itself an output, the map from LFSR state
// to output vector is one to one: over one LFSR period the BS-LFSR produces
// exactly the same set of vectors as the plain LFSR, in a different order and
// with fewer bit transitions between consecutive vectors.
//
// Mux polarity: select = 1 passes each cell to its own output (O1 = c1,
// O2 = c2); select = 0 swaps the pair. The pairing and the select from cN
// follow the document; the polarity is read from the 0/1 input labels of the
// multiplexer drawing. The default size N = 4 is that of the 4-bit output
// of the document's simulation; feedback taps are those of lfsr.
//
// SEL_CELL (1-based) moves the select line to another cell, the general
// arrangement in which any cell x drives the swap of neighbouring cells; a
// pair that contains the select cell is then left unswapped so that the
// vector set stays the same. The default, SEL_CELL = N, is the document's.
//
// Interface: pattern[i-1] is output O_i (pattern[N-1] = cN). lfsr_state
// exposes the underlying LFSR. Timing: as lfsr; the outputs are
// combinational from the registered state, so a new vector appears one
// clock after each enabled edge.
module bs_lfsr #(
  parameter int unsigned      N    = 4,
  parameter logic [N-1:0]     TAPS = N'(4'b1001),
  parameter logic [N-1:0]     SEED = N'(1),
  parameter int unsigned      SEL_CELL = N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [N-1:0] pattern,
  output logic [N-1:0] lfsr_state,
  output logic         swap        // 1 while the pairs are exchanged
);

  logic sel;

  lfsr #(.WIDTH(N), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .en    (en),
    .state (lfsr_state)
  );

  assign sel  = lfsr_state[SEL_CELL-1];
  assign swap = ~sel;

  always_comb begin
    pattern = lfsr_state;
    // pairs (c1,c2), (c3,c4), ... that lie before cN and hold no select cell
    for (int unsigned i = 0; i + 1 < N - 1; i += 2) begin
      if (i != SEL_CELL - 1 && i + 1 != SEL_CELL - 1) begin
        pattern[i]   = sel ? lfsr_state[i]   : lfsr_state[i+1];
        pattern[i+1] = sel ? lfsr_state[i+1] : lfsr_state[i];
      end
    end
  end

endmodule
