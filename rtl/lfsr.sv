// lfsr: conventional external-feedback (Fibonacci) linear feedback shift
// register, the pattern source inside both the bit swapping LFSR and the
// LT-RTPG.
//
// Cells are numbered c1..cN as in the bit swapping LFSR drawing; state[i-1]
// holds c_i. On each enabled clock every cell takes the value of the cell
// before it (c1 -> c2 -> ... -> cN) and c1 takes the XOR of the cells whose
// bit is set in TAPS. The default TAPS (cells 1 and 4 of a 4-cell register)
// is a primitive polynomial, so the register runs through all 15 non-zero
// states. The XOR feedback into c1 and the 4-cell size follow the drawing
// of the BS-LFSR; the tap choice for other sizes is left to the user.
//
// Timing: `load` (synchronous, over `en`) puts SEED into the register;
// `en` advances it by one state per clock. Reset loads SEED. SEED must not be
// all zeros.
module lfsr #(
  parameter int unsigned    WIDTH = 4,
  parameter logic [WIDTH-1:0] TAPS = WIDTH'(4'b1001),
  parameter logic [WIDTH-1:0] SEED = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic feedback;

  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= SEED;
    else if (load)  state <= SEED;
    else if (en)    state <= {state[WIDTH-2:0], feedback};
  end

endmodule
