// output_enabler -- withholds the comparison result until a whole test vector
// has been compared.
//
// One down counter is shared by all protected scan chains. While sen = 0 it
// loads N_SFF, the length of the longest chain. While sen = 1 it counts down
// by one per clock and stops at zero. Its terminal count (tc, count = 0) is
// reached exactly N_SFF shift clocks after the last capture, i.e. once every bit
// of every chain has passed the sticky comparators. Each chain's result is
// then test_res[i] = tc AND NOT flag[i]: 1 means "the whole vector matched".
// Before tc the outputs are 0, so an early stop of the shift gives a fail and
// never a per-bit answer.
//
// Interface: clk is the scan clock; sen is sampled on its rising edge; flag[]
// come from the sticky comparators; test_res[] and tc are combinational from
// registers. After a capture edge, the first comparison happens on the next
// shift edge, and tc rises after the N_SFF-th shift edge.
//
// The parallel-load down counter, its load on sen = 0 and the gating of the
// result by the terminal count follow the published scheme. The counter
// holding at zero and the polarity of test_res (1 = pass) are this design's
// reading of it. Counter width is ceil(log2(N_SFF + 1)), 14 bits for 10000.
module output_enabler #(
  parameter int unsigned N_CHAINS = 32,     // protected scan chains
  parameter int unsigned N_SFF    = 10000,  // scan flip-flops in the longest chain
  localparam int unsigned CNT_W   = $clog2(N_SFF + 1)
) (
  input  logic                clk,
  input  logic                sen,
  input  logic [N_CHAINS-1:0] flag,
  output logic [N_CHAINS-1:0] test_res,
  output logic                tc
);

  logic [CNT_W-1:0] count;

  always_ff @(posedge clk) begin
    if (!sen)            count <= CNT_W'(N_SFF);
    else if (count != 0) count <= count - 1'b1;
  end

  always_comb begin
    tc       = (count == '0);
    test_res = {N_CHAINS{tc}} & ~flag;
  end

  // Load while sen = 0; while shifting, move down by one until zero.
  a_load: assert property (@(posedge clk) !sen |=> count == CNT_W'(N_SFF));
  a_down: assert property (@(posedge clk) sen && count != '0 |=> count == $past(count) - 1'b1);

endmodule
