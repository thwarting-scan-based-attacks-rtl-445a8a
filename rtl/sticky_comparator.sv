// sticky_comparator -- serial, sticky comparison of one scan chain's output
// against the expected response supplied by the tester.
//
// While scan shifting is enabled (sen = 1), every clock compares the bit leaving
// the scan chain (sout) with the expected bit (sexp). A mismatch sets the flag
// flip-flop, and the flag then stays set for the rest of the vector: the next
// state is flag OR (sout XOR sexp). The flag never reveals which bit differed,
// only that at least one did. While sen = 0 (capture), the flag is cleared, so
// each unload of the chain starts a fresh comparison.
//
// Interface: clk is the scan clock shared with the scan chains; sen, sout and
// sexp are sampled on its rising edge; flag is a register output (1 = at least
// one mismatch since sen last was 0).
//
// The XOR/OR/flag structure and the clearing by sen = 0 follow the published
// scheme. That the clear is synchronous (taken at the capture clock edge) is
// this design's choice: it keeps the previous result readable while sen is
// low until the first capture edge.
module sticky_comparator (
  input  logic clk,
  input  logic sen,   // scan enable: 1 = shift/compare, 0 = capture/clear
  input  logic sout,  // actual response bit from the scan chain
  input  logic sexp,  // expected response bit from the tester
  output logic flag   // 1 = a mismatch was seen in this vector
);

  logic mismatch;

  always_comb mismatch = sout ^ sexp;

  always_ff @(posedge clk) begin
    if (!sen) flag <= 1'b0;
    else      flag <= flag | mismatch;
  end

endmodule
