// bist_pkg: types and constants shared by the BIST test-pattern generators,
// the Reed-Muller circuit under test and the top level.
//
// - tpg_sel_e picks which pattern generator drives the circuit under test:
//   the bit swapping LFSR (one vector per clock) or the low-transition
//   random TPG feeding a scan chain (one vector per scan load).
// - fault_t describes one injected single stuck-at fault: an enable, the
//   stuck value and the index of the faulted line (see rm_cut for the
//   numbering of lines).
// - rm_coeff() turns a truth table into the coefficients of its positive
//   polarity Reed-Muller (AND/XOR) expansion. Coefficient m, for the product
//   of the variables whose bits are set in m, is the XOR of the truth-table
//   entries f_j over every j whose set bits are a subset of m. For three
//   variables (W = bit 2, X = bit 1, Y = bit 0) this gives C_W = f0^f4,
//   C_WX = f0^f2^f4^f6, C_WXY = f0^...^f7, the rules of the expansion.
package bist_pkg;

  typedef enum logic {
    TPG_BSLFSR = 1'b0,   // bit swapping LFSR, test per clock
    TPG_LTRTPG = 1'b1    // LT-RTPG into scan chain, test per scan
  } tpg_sel_e;

  localparam int unsigned SITE_W = 6;   // width of a fault-site index

  typedef struct packed {
    logic              en;     // 1: the fault is present
    logic              value;  // stuck-at value
    logic [SITE_W-1:0] site;   // faulted line, numbered as in rm_cut
  } fault_t;

  // Reed-Muller coefficients of an n-variable truth table (n <= 5).
  function automatic logic [31:0] rm_coeff(input logic [31:0] truth, input int unsigned n);
    logic [31:0] c;
    c = '0;
    for (int unsigned m = 0; m < (1 << n); m++) begin
      for (int unsigned j = 0; j < (1 << n); j++) begin
        if ((j & ~m) == 0) c[m] = c[m] ^ truth[j];
      end
    end
    return c;
  endfunction

endpackage
