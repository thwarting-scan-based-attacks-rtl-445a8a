// sticky_comparator_masked -- sticky comparator that may ignore a limited
// number of response bits per test vector.
//
// Some scan cells capture unpredictable values, for which no expected bit can
// be given. While mask = 1 the bit on sout is not compared and the flag keeps
// its value. Masking must be limited, or an attacker could mask all bits but
// one and read the chain bit by bit; a P-counter therefore counts the masked
// bits of the current vector and, once it has reached P, further mask requests
// are refused and those bits are compared normally.
//
//   mask_ok  = mask AND NOT p_tc            (a mask request is honoured)
//   flag    <= flag OR ((sout XOR sexp) AND NOT mask_ok)
//   p_count <= p_count + mask_ok            (p_tc = p_count == P)
//
// While sen = 0 both the flag and the P-counter are cleared. With at most P
// bits masked, a brute-force search for the response still needs
// 2^(N_SFF - P) tries.
//
// Interface: clk is the scan clock; sen, sout, sexp and mask are sampled on
// its rising edge; flag is a register output.
//
// The gating of the comparison by the mask, the P-counter with its enable and
// terminal count, and the clearing by sen follow the published scheme. The
// counter counting up from zero to P, the synchronous clear and the default
// P = 32 are this design's choices.
module sticky_comparator_masked #(
  parameter int unsigned P = 32,  // most bits that may be masked per vector
  localparam int unsigned PCNT_W = $clog2(P + 1)
) (
  input  logic clk,
  input  logic sen,   // scan enable: 1 = shift/compare, 0 = capture/clear
  input  logic sout,  // actual response bit from the scan chain
  input  logic sexp,  // expected response bit from the tester
  input  logic mask,  // 1 = do not compare this bit (if still allowed)
  output logic flag   // 1 = an unmasked mismatch was seen in this vector
);

  logic [PCNT_W-1:0] p_count;
  logic              p_tc;
  logic              mask_ok;
  logic              mismatch;

  always_comb begin
    p_tc     = (p_count == PCNT_W'(P));
    mask_ok  = mask & ~p_tc;
    mismatch = (sout ^ sexp) & ~mask_ok;
  end

  always_ff @(posedge clk) begin
    if (!sen) begin
      flag    <= 1'b0;
      p_count <= '0;
    end else begin
      flag <= flag | mismatch;
      if (mask_ok) p_count <= p_count + 1'b1;
    end
  end

  // The mask budget restarts at each capture and, once used up, stays used up
  // until then.
  a_p_clear: assert property (@(posedge clk) !sen |=> p_count == '0);
  a_p_hold:  assert property (@(posedge clk) sen && p_tc |=> p_tc);

endmodule
