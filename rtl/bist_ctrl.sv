// bist_ctrl: sequencer of one BIST session.
//
// A pulse on `start` reseeds the pattern generators and clears the response
// analyzer (one INIT cycle), then runs the session of the selected mode:
//   TPG_BSLFSR  test per clock: every clock applies one BS-LFSR vector to
//               the circuits, compares their responses and advances the
//               generator, for BS_PATTERNS clocks.
//   TPG_LTRTPG  test per scan: SCAN_LEN shift clocks load the scan chains
//               from the LT-RTPG, then one capture clock loads the circuit
//               responses into the chains; repeated LT_PATTERNS times. The
//               first shift clock of each load moves the previous response
//               out of the chains, and that is when the analyzer compares;
//               one extra unload clock shifts out the last response.
// `done` stays high from the end of the session until the next `start`.
// Session length: `done` rises on clock edge 2 + BS_PATTERNS, or
// 3 + LT_PATTERNS*(SCAN_LEN+1), counting the edge that samples `start` as 1.
// The document gives no controller; this one is the simplest sequencing of
// the two test styles it describes.
module bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned BS_PATTERNS = 15,
  parameter int unsigned LT_PATTERNS = 32,
  parameter int unsigned SCAN_LEN    = 3,
  parameter int unsigned CNT_W       = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  tpg_sel_e         mode,
  output logic             tpg_load,
  output logic             bs_en,
  output logic             lt_en,
  output logic             scan_shift,
  output logic             scan_capture,
  output logic             ora_en,
  output logic             ora_clear,
  output logic             busy,
  output logic             done,
  output logic [CNT_W-1:0] patterns     // vectors applied so far
);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_BS_RUN, S_LT_SHIFT, S_LT_CAPTURE, S_LT_UNLOAD, S_DONE
  } state_e;

  state_e         state;
  tpg_sel_e       mode_q;
  logic [CNT_W-1:0] shift_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mode_q    <= TPG_BSLFSR;
      patterns  <= '0;
      shift_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          state    <= S_INIT;
          mode_q   <= mode;
          patterns <= '0;
        end
        S_INIT: begin
          shift_cnt <= '0;
          state     <= (mode_q == TPG_BSLFSR) ? S_BS_RUN : S_LT_SHIFT;
        end
        S_BS_RUN: begin
          patterns <= patterns + 1'b1;
          if (patterns + 1'b1 == CNT_W'(BS_PATTERNS)) state <= S_DONE;
        end
        S_LT_SHIFT: begin
          shift_cnt <= shift_cnt + 1'b1;
          if (shift_cnt + 1'b1 == CNT_W'(SCAN_LEN)) state <= S_LT_CAPTURE;
        end
        S_LT_CAPTURE: begin
          patterns  <= patterns + 1'b1;
          shift_cnt <= '0;
          state     <= (patterns + 1'b1 == CNT_W'(LT_PATTERNS)) ? S_LT_UNLOAD : S_LT_SHIFT;
        end
        S_LT_UNLOAD: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign tpg_load   = (state == S_INIT);
  assign ora_clear  = (state == S_INIT);
  assign bs_en      = (state == S_BS_RUN);
  assign lt_en      = (state == S_LT_SHIFT);
  assign scan_shift   = (state == S_LT_SHIFT) || (state == S_LT_UNLOAD);
  assign scan_capture = (state == S_LT_CAPTURE);
  // compare: every BS-LFSR clock; in scan mode while a captured response
  // leaves the chains (first shift of a later load, or the unload clock)
  assign ora_en     = (state == S_BS_RUN) || (state == S_LT_UNLOAD) ||
                      (state == S_LT_SHIFT && shift_cnt == '0 && patterns != '0);
  assign busy       = (state != S_IDLE) && (state != S_DONE);
  assign done       = (state == S_DONE);

endmodule
