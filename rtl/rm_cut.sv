// rm_cut: Reed-Muller (AND/XOR) realisation of a Boolean function, used as
// the circuit under test, with one injectable single stuck-at fault.
//
// Any function of N variables can be written as C_0 ^ C_1 x_1 ^ ... with
// products of the (uncomplemented) inputs and constant coefficients. The
// coefficients are derived at elaboration time from the truth table TRUTH
// (bit j = f(j)) by bist_pkg::rm_coeff. The circuit is an AND gate per
// product of two or more variables and a single XOR chain that starts from
// the constant 1 (when C_0 = 1) and adds each term with a non-zero
// coefficient in order of its variable mask. The default is the document's
// example f(W,X,Y) = WX + W'Y + X'Y' = 1 ^ X ^ WX ^ WY ^ XY, with W = x[2],
// X = x[1], Y = x[0]; the order of terms along the chain is this design's.
//
// Fault lines (fault.site), N = number of inputs:
//   0 .. N-1               input x[i] at its stem (all its branches)
//   N + m, m = 0..2^N-1     product term m: the constant-1 line for m = 0,
//                           the branch into the chain for a single
//                           variable, the AND gate output otherwise
//   N + 2^N + m             XOR chain node after term m; node 2^N-1 is f
// Sites of terms with a zero coefficient are wires with no effect on f.
// With fault.en = 0 the circuit is fault free. Purely combinational.
module rm_cut
  import bist_pkg::*;
#(
  parameter int unsigned           N     = 3,
  parameter logic [(1<<N)-1:0]     TRUTH = (1<<N)'(8'hDB)
) (
  input  logic [N-1:0] x,
  input  fault_t       fault,
  output logic         f
);

  localparam int unsigned T = 1 << N;
  localparam logic [T-1:0] COEFF = T'(rm_coeff(32'(TRUTH), N));

  // apply the injected stuck-at fault to line `site`
  function automatic logic line(input logic v, input logic [SITE_W-1:0] site, input fault_t flt);
    return (flt.en && flt.site == site) ? flt.value : v;
  endfunction

  logic [N-1:0] xi;     // inputs after stem faults
  logic [T-1:0] prod;   // product terms after their faults
  logic [T-1:0] chain;  // XOR chain nodes after their faults
  logic         acc;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) xi[i] = line(x[i], SITE_W'(i), fault);

    for (int unsigned m = 0; m < T; m++) begin
      logic p;
      p = 1'b1;
      for (int unsigned i = 0; i < N; i++) if (m[i]) p = p & xi[i];
      prod[m] = line(p, SITE_W'(N + m), fault);
    end

    acc = 1'b0;
    for (int unsigned m = 0; m < T; m++) begin
      if (COEFF[m]) acc = acc ^ prod[m];
      acc      = line(acc, SITE_W'(N + T + m), fault);
      chain[m] = acc;
    end
  end

  assign f = chain[T-1];

endmodule
