// scan_dut_model -- behavioural stand-in for a scan-inserted circuit under
// test, for simulation only.
//
// N_CHAINS scan chains of N_SFF flip-flops. With sen = 1 every chain shifts by
// one on the rising clock edge: sin[c] enters flip-flop 0 and sout[c] is
// flip-flop N_SFF-1. With sen = 0 every chain captures the circuit's response,
// rotate_left(state, 1) XOR key(c) (see scan_tb_pkg). A single stuck-at fault
// can be switched on: while fault_en = 1 the captured bit fault_pos of chain
// fault_chain is forced to fault_val.
module scan_dut_model
  import scan_tb_pkg::*;
#(
  parameter int unsigned N_CHAINS = 4,
  parameter int unsigned N_SFF    = 16
) (
  input  logic                clk,
  input  logic                sen,
  input  logic [N_CHAINS-1:0] sin,
  output logic [N_CHAINS-1:0] sout,
  input  logic                fault_en,
  input  int unsigned         fault_chain,
  input  int unsigned         fault_pos,
  input  logic                fault_val
);

  logic [N_SFF-1:0] chain [N_CHAINS];

  function automatic logic [N_SFF-1:0] response(input logic [N_SFF-1:0] v, input int unsigned c);
    logic [N_SFF-1:0] r;
    r = {v[N_SFF-2:0], v[N_SFF-1]};
    for (int unsigned i = 0; i < N_SFF; i++) r[i] ^= key_bit(c, i);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    for (int unsigned c = 0; c < N_CHAINS; c++) begin
      if (sen) begin
        chain[c] <= {chain[c][N_SFF-2:0], sin[c]};
      end else begin
        logic [N_SFF-1:0] r;
        r = response(chain[c], c);
        if (fault_en && c == fault_chain) r[fault_pos] = fault_val;
        chain[c] <= r;
      end
    end
  end

  always_comb
    for (int unsigned c = 0; c < N_CHAINS; c++) sout[c] = chain[c][N_SFF-1];

endmodule
