// scan_chain: the scan chain between the LT-RTPG and the circuit under
// test. LEN scan cells form a shift register. With `shift` high each clock
// moves every cell one place towards the end and loads `si` into the first
// cell; the cells drive the circuit's inputs in parallel (q) and the last
// cell is the chain output `so`, which goes to the response analyzer. With
// `capture` high (and `shift` low) the cells load the circuit's responses
// `d` in parallel, the capture cycle of test-per-scan BIST; the next shifts
// move the captured response out at `so` while the next vector moves in.
// With neither, the cells hold.
//
// The shift/capture chain feeding the circuit and the analyzer follows the
// document; the default LEN = 3, matching the three inputs of the
// Reed-Muller circuit, is this design's. q[0] is the cell loaded first from
// `si`; after LEN shifts q[LEN-1] holds the first bit shifted in. Which
// cells capture a response is up to the instantiating module through `d`
// (a cell that should keep its value gets its own q). Reset clears the
// chain.
module scan_chain #(
  parameter int unsigned LEN = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift,
  input  logic           capture,
  input  logic           si,
  input  logic [LEN-1:0] d,
  output logic [LEN-1:0] q,
  output logic           so
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (shift)    q <= (LEN > 1) ? {q[LEN-2:0], si} : LEN'(si);
    else if (capture)  q <= d;
  end

  assign so = q[LEN-1];

endmodule
