// bist_top: built-in self-test of a Reed-Muller circuit with two
// low-power test pattern generators.
//
// Copies of the circuit under test (rm_cut) receive the same test
// vectors: a reference copy that is always fault free (response `wof`) and
// NCUT copies into which single stuck-at faults can be injected (responses
// `wif`). The comparator response analyzer (ora_cmp) flags any copy whose
// response differs from the reference. The vectors come from one of two
// generators, chosen per session by `mode`:
//   TPG_BSLFSR  the bit swapping LFSR (bs_lfsr) drives the circuit inputs
//               directly, one vector per clock (test per clock); its low
//               N_VARS outputs are the inputs W, X, Y.
//   TPG_LTRTPG  the LT-RTPG (lt_rtpg) shifts its low-transition bit stream
//               into scan chains (scan_chain) whose cells drive the
//               inputs (test per scan). Every copy has its own chain, all
//               loaded from the same bit stream, so all see the same vector.
//               On the capture clock each chain loads its copy's response
//               into its last cell; the first shift of the next load moves
//               it out at the chain output, where the analyzer compares the
//               copies' chain outputs with the reference chain's.
// bist_ctrl sequences a session: `start` begins it, `done` ends it, and
// `fault_detected` then tells whether any injected fault was seen;
// `fail` names the failing copies.
//
// Timing: `start` is a one-clock pulse while idle; counting the edge that
// samples it as 1, `done` rises on edge 2 + BS_PATTERNS (BS-LFSR) or
// 3 + LT_PATTERNS*(N_VARS+1) (LT-RTPG) and holds until the next `start`.
//
// The generators, the scan chain, the circuit and the comparator follow the
// document. This design's own: the sizes the document leaves open (see each
// module), the controller, the number of vectors per session (one full
// BS-LFSR period, 2^BS_N - 1; LT_PATTERNS scan loads), one scan chain per
// circuit copy and the port list. The LFSR states and the analyzer's
// per-clock mismatch vector are left unconnected here on purpose.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned        BS_N        = 4,
  parameter int unsigned        LT_R        = 5,
  parameter int unsigned        LT_K        = 3,
  parameter int unsigned        N_VARS      = 3,
  parameter logic [(1<<N_VARS)-1:0] TRUTH   = (1<<N_VARS)'(8'hDB),
  parameter int unsigned        NCUT        = 1,
  parameter int unsigned        BS_PATTERNS = (1 << BS_N) - 1,
  parameter int unsigned        LT_PATTERNS = 32,
  parameter int unsigned        CNT_W       = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  tpg_sel_e               mode,
  input  fault_t [NCUT-1:0]      faults,          // one per copy under test
  output logic                   busy,
  output logic                   done,
  output logic                   fault_detected,
  output logic [NCUT-1:0]        fail,
  output logic                   wof,             // reference response
  output logic [NCUT-1:0]        wif,             // responses of the copies under test
  output logic [BS_N-1:0]        bslf,            // BS-LFSR output vector
  output logic                   bs_swap,         // BS-LFSR pairs exchanged
  output logic                   lt_toggle,       // LT-RTPG T input
  output logic                   chain_in,        // LT-RTPG output (scan input)
  output logic [N_VARS-1:0]      scan_cells,      // reference scan chain contents
  output logic                   chain_out,       // reference scan chain output
  output logic [N_VARS-1:0]      cut_in,          // vector applied to the circuits
  output logic [CNT_W-1:0]       patterns,
  output logic [CNT_W-1:0]       errors
);

  logic tpg_load, bs_en, lt_en, scan_shift, scan_capture, ora_en, ora_clear;
  logic [N_VARS-1:0] ref_cap;
  logic [NCUT-1:0]   cut_so, ora_cut;
  logic              ora_ref;
  logic [BS_N-1:0] bs_state;
  logic [LT_R-1:0] lt_state;
  logic [NCUT-1:0] mismatch;
  tpg_sel_e        mode_q;

  bist_ctrl #(
    .BS_PATTERNS (BS_PATTERNS),
    .LT_PATTERNS (LT_PATTERNS),
    .SCAN_LEN    (N_VARS),
    .CNT_W       (CNT_W)
  ) u_ctrl (
    .clk, .rst_n, .start, .mode,
    .tpg_load, .bs_en, .lt_en, .scan_shift, .scan_capture, .ora_en, .ora_clear,
    .busy, .done, .patterns
  );

  // mode of the running session, held for the input multiplexer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      mode_q <= TPG_BSLFSR;
    else if (start && !busy)         mode_q <= mode;
  end

  bs_lfsr #(.N(BS_N)) u_bs (
    .clk, .rst_n, .load(tpg_load), .en(bs_en),
    .pattern(bslf), .lfsr_state(bs_state), .swap(bs_swap)
  );

  lt_rtpg #(.R(LT_R), .K(LT_K)) u_lt (
    .clk, .rst_n, .load(tpg_load), .en(lt_en),
    .chain_in, .toggle(lt_toggle), .lfsr_state(lt_state)
  );

  // reference: chain, circuit and captured response (last cell)
  always_comb begin
    ref_cap         = scan_cells;
    ref_cap[N_VARS-1] = wof;
  end

  scan_chain #(.LEN(N_VARS)) u_scan (
    .clk, .rst_n, .shift(scan_shift), .capture(scan_capture), .si(chain_in),
    .d(ref_cap), .q(scan_cells), .so(chain_out)
  );

  assign cut_in = (mode_q == TPG_BSLFSR) ? bslf[N_VARS-1:0] : scan_cells;

  rm_cut #(.N(N_VARS), .TRUTH(TRUTH)) u_ref (
    .x(cut_in), .fault('0), .f(wof)
  );

  // copies under test, each with its own scan chain
  for (genvar c = 0; c < NCUT; c++) begin : g_cut
    logic [N_VARS-1:0] q, cap, x;

    always_comb begin
      cap         = q;
      cap[N_VARS-1] = wif[c];
    end

    scan_chain #(.LEN(N_VARS)) u_scan (
      .clk, .rst_n, .shift(scan_shift), .capture(scan_capture), .si(chain_in),
      .d(cap), .q(q), .so(cut_so[c])
    );

    assign x = (mode_q == TPG_BSLFSR) ? bslf[N_VARS-1:0] : q;

    rm_cut #(.N(N_VARS), .TRUTH(TRUTH)) u_cut (
      .x(x), .fault(faults[c]), .f(wif[c])
    );
  end

  // analyzer inputs: responses directly (test per clock) or chain outputs
  assign ora_ref = (mode_q == TPG_BSLFSR) ? wof : chain_out;
  assign ora_cut = (mode_q == TPG_BSLFSR) ? wif : cut_so;

  ora_cmp #(.NCUT(NCUT), .W(1), .CW(CNT_W)) u_ora (
    .clk, .rst_n, .clear(ora_clear), .en(ora_en),
    .ref_resp(ora_ref), .cut_resp(ora_cut),
    .mismatch, .fail, .fault(fault_detected), .errors
  );

endmodule
