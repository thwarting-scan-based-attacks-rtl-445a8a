// secure_comparator -- on-chip comparison of scan responses, so that the
// contents of the scan chains of a secure circuit never leave the chip.
//
// In a normal scan test the responses captured in the scan flip-flops are
// shifted out and compared by the tester, which also lets an attacker read
// the internal state of a crypto core. Here the tester instead shifts the
// expected response into pin sexp[i] while the actual response leaves scan
// chain i on sout[i]. A sticky comparator per chain records whether any bit
// differed, and a shared output enabler releases one pass/fail bit per chain
// only after all N_SFF bits have been compared. The pass/fail bit leaves on
// the same pin that carries the chain's scan input: the pin is an input while
// sen = 1 (shift) and an output while sen = 0 (capture). The pin count is thus
// the same as for plain scan: Sin/TestRes, Sexp (in place of Sout) and Sen.
//
// Test flow per vector, all on the rising edge of clk (the scan clock):
//   1. sen = 1 for N_SFF clocks: shift the next stimulus in through the pad
//      and the expected bits of the previous response in through sexp, while
//      the previous response leaves on sout and is compared.
//   2. sen = 0: the pad now drives test_res (1 = the whole vector matched,
//      0 = a mismatch or fewer than N_SFF bits compared). Read it before the
//      first capture edge; that edge clears the flags and reloads the counter.
//   3. One or more capture clocks with sen = 0, then back to step 1.
//
// With MASKING = 1 each chain uses the masking variant of the sticky
// comparator: mask[i] = 1 excludes the current bit from the comparison, for at
// most P bits per vector. With MASKING = 0 the mask inputs are not used (a
// lint tool reports them as unused in that configuration).
//
// Ports to the circuit under test: sin_dut[i] feeds chain i, sout[i] is its
// last flip-flop; the circuit takes sen directly from the chip's Sen pin.
//
// The structure (sticky comparator per chain, one shared counter, per-chain
// gating, shared Sin/TestRes pin, optional masking) follows the published
// scheme. The defaults 32 chains of 10000 flip-flops are its sizing example;
// the default P and the read-before-capture timing are this design's choices.
module secure_comparator #(
  parameter int unsigned N_CHAINS = 32,     // protected scan chains (S)
  parameter int unsigned N_SFF    = 10000,  // flip-flops in the longest chain
  parameter bit          MASKING  = 1'b0,   // 1 = sticky comparators with masking
  parameter int unsigned P        = 32      // mask budget per vector (MASKING = 1)
) (
  input  logic                clk,              // scan clock
  input  logic                sen,              // Sen pin
  input  logic [N_CHAINS-1:0] sexp,             // Sexp pins (expected responses)
  input  logic [N_CHAINS-1:0] mask,             // Mask pins (MASKING = 1 only)
  inout  wire  [N_CHAINS-1:0] sin_testres_pad,  // shared Sin / TestRes pins
  input  logic [N_CHAINS-1:0] sout,             // scan outputs of the circuit
  output logic [N_CHAINS-1:0] sin_dut           // scan inputs of the circuit
);

  logic [N_CHAINS-1:0] flag;
  logic [N_CHAINS-1:0] test_res;

  for (genvar i = 0; i < N_CHAINS; i++) begin : g_chain
    if (MASKING) begin : g_masked
      sticky_comparator_masked #(.P(P)) u_cmp (
        .clk, .sen, .sout(sout[i]), .sexp(sexp[i]), .mask(mask[i]), .flag(flag[i])
      );
    end else begin : g_plain
      sticky_comparator u_cmp (
        .clk, .sen, .sout(sout[i]), .sexp(sexp[i]), .flag(flag[i])
      );
    end

    io_buffer u_pad (
      .pad(sin_testres_pad[i]), .oe(~sen), .d_out(test_res[i]), .d_in(sin_dut[i])
    );
  end

  output_enabler #(.N_CHAINS(N_CHAINS), .N_SFF(N_SFF)) u_oe (
    .clk, .sen, .flag, .test_res, .tc()
  );

endmodule
