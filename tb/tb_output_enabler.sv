// tb_output_enabler -- self-checking test of the output enabler.
//
// Uses 3 chains of 13 flip-flops. After a load (sen = 0) the terminal count
// must appear exactly 13 shift clocks later, not one earlier, and then hold
// while shifting continues. test_res[i] must equal tc AND NOT flag[i] at all
// times, so no result is released before the whole vector was compared. A
// random phase with short and long shift runs checks the cycle count of every
// run against a reference counter.
module tb_output_enabler;

  localparam int unsigned S = 3;
  localparam int unsigned N = 13;

  logic         clk = 1'b0;
  logic         sen;
  logic [S-1:0] flag, test_res;
  logic         tc;
  int           checks = 0, failures = 0;
  int           shifts;          // shift clocks since the last load
  int           tc_rises = 0, early_reads = 0;

  output_enabler #(.N_CHAINS(S), .N_SFF(N)) dut (.clk, .sen, .flag, .test_res, .tc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    logic         exp_tc;
    logic [S-1:0] exp_res;
    exp_tc  = (shifts >= N);
    exp_res = exp_tc ? ~flag : '0;
    checks++;
    if (tc !== exp_tc || test_res !== exp_res) begin
      failures++;
      $display("%0t: shifts=%0d tc=%b (exp %b) test_res=%b (exp %b)",
               $time, shifts, tc, exp_tc, test_res, exp_res);
    end
  endtask

  task automatic step(input logic s);
    @(negedge clk);
    sen  = s;
    flag = S'($urandom);
    @(posedge clk);
    if (!s) shifts = 0;
    else    shifts++;
    #1 check_outputs();
    flag = ~flag;              // test_res follows flag combinationally
    #1 check_outputs();
  endtask

  initial begin
    shifts = 0;
    step(1'b0);
    for (int i = 0; i < N - 1; i++) step(1'b1);
    checks++; if (tc !== 1'b0) begin failures++; $display("tc one cycle early"); end
    step(1'b1);
    checks++; if (tc !== 1'b1) begin failures++; $display("tc not after %0d shifts", N); end
    else tc_rises++;
    for (int i = 0; i < 5; i++) step(1'b1);   // holds at zero
    step(1'b0);
    checks++; if (tc !== 1'b0) begin failures++; $display("no reload"); end
    // random shift runs of 0 .. 2N clocks, each followed by one or two captures
    for (int r = 0; r < 300; r++) begin
      automatic int len = $urandom % (2 * N + 1);
      for (int i = 0; i < len; i++) step(1'b1);
      if (len < N) early_reads++;
      else         tc_rises++;
      repeat (1 + $urandom % 2) step(1'b0);
    end
    checks++;
    if (tc_rises == 0 || early_reads == 0) begin failures++; $display("a case never happened"); end
    $display("tc reached %0d times, %0d runs stopped early", tc_rises, early_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
