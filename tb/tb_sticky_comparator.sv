// tb_sticky_comparator -- self-checking test of the sticky comparator.
//
// Drives random scan-enable, actual and expected bit streams and compares the
// flag after every clock with a reference computed in the testbench: the flag
// is cleared by every clock with sen = 0 and, once a mismatch has been seen
// with sen = 1, stays set until the next clear. Also checks the two cases that
// matter for the test flow: a fully matching vector leaves the flag at 0, and a
// single mismatching bit among many matching ones sets it for good.
module tb_sticky_comparator;

  logic clk = 1'b0;
  logic sen, sout, sexp, flag;
  logic ref_flag;
  int   checks = 0, failures = 0;
  int   sets = 0, clears = 0;

  sticky_comparator dut (.clk, .sen, .sout, .sexp, .flag);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic s, input logic a, input logic e);
    @(negedge clk);
    sen = s; sout = a; sexp = e;
    @(posedge clk);
    if (!s)             begin ref_flag = 1'b0; clears++; end
    else if (a != e)    begin if (!ref_flag) sets++; ref_flag = 1'b1; end
    #1;
    checks++;
    if (flag !== ref_flag) begin
      failures++;
      $display("%0t: flag=%b expected %b (sen=%b sout=%b sexp=%b)", $time, flag, ref_flag, s, a, e);
    end
  endtask

  initial begin
    ref_flag = 1'b0;
    step(1'b0, 1'b0, 1'b1);            // capture clears, even with a mismatch on the pins
    // a matching vector of 64 bits
    for (int i = 0; i < 64; i++) begin
      automatic logic b = 1'($urandom);
      step(1'b1, b, b);
    end
    checks++; if (flag !== 1'b0) begin failures++; $display("matching vector flagged"); end
    // one mismatch at bit 20 of 64, the rest matching: sticky
    step(1'b0, 1'b0, 1'b0);
    for (int i = 0; i < 64; i++) begin
      automatic logic b = 1'($urandom);
      step(1'b1, b, (i == 20) ? ~b : b);
    end
    checks++; if (flag !== 1'b1) begin failures++; $display("single mismatch lost"); end
    // random traffic
    for (int i = 0; i < 5000; i++)
      step(($urandom % 16) != 0, 1'($urandom), ($urandom % 8 == 0) ? 1'($urandom) : 1'b0);
    checks++;
    if (sets == 0 || clears == 0) begin failures++; $display("flag never set or cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
