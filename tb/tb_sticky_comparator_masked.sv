// tb_sticky_comparator_masked -- self-checking test of the sticky comparator
// with masking, at a mask budget of P = 4.
//
// A reference in the testbench keeps its own flag and count of honoured mask
// requests: a request is honoured only while fewer than P bits of the current
// vector have been masked, an honoured bit is never compared, and every other
// bit is compared as usual. Directed cases: P masked mismatches give a pass,
// a (P+1)-th masked mismatch is refused and gives a fail, and the budget is
// restored by the next capture.
module tb_sticky_comparator_masked;

  localparam int unsigned P = 4;

  logic clk = 1'b0;
  logic sen, sout, sexp, mask, flag;
  logic ref_flag;
  int   ref_masked;
  int   checks = 0, failures = 0;
  int   honoured = 0, refused = 0;

  sticky_comparator_masked #(.P(P)) dut (.clk, .sen, .sout, .sexp, .mask, .flag);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic s, input logic a, input logic e, input logic m);
    @(negedge clk);
    sen = s; sout = a; sexp = e; mask = m;
    @(posedge clk);
    if (!s) begin
      ref_flag   = 1'b0;
      ref_masked = 0;
    end else if (m && ref_masked < int'(P)) begin
      ref_masked++;
      honoured++;
    end else begin
      if (m) refused++;
      if (a != e) ref_flag = 1'b1;
    end
    #1;
    checks++;
    if (flag !== ref_flag) begin
      failures++;
      $display("%0t: flag=%b expected %b (masked so far %0d)", $time, flag, ref_flag, ref_masked);
    end
  endtask

  // One 32-bit vector whose bits at positions < nbad mismatch and are masked.
  task automatic vector_with_masked_errors(input int nbad, input logic expect_flag);
    step(1'b0, 1'b0, 1'b0, 1'b0);
    for (int i = 0; i < 32; i++) begin
      automatic logic b = 1'($urandom);
      step(1'b1, b, (i < nbad) ? ~b : b, i < nbad);
    end
    checks++;
    if (flag !== expect_flag) begin
      failures++;
      $display("%0d masked mismatches: flag=%b expected %b", nbad, flag, expect_flag);
    end
  endtask

  initial begin
    ref_flag   = 1'b0;
    ref_masked = 0;
    vector_with_masked_errors(0, 1'b0);
    vector_with_masked_errors(int'(P), 1'b0);      // budget exactly used
    vector_with_masked_errors(int'(P) + 1, 1'b1);  // one request too many
    vector_with_masked_errors(int'(P), 1'b0);      // budget restored by capture
    for (int i = 0; i < 5000; i++)
      step(($urandom % 24) != 0, 1'($urandom), 1'($urandom), ($urandom % 4) == 0);
    checks++;
    if (honoured == 0 || refused == 0) begin failures++; $display("masking case never happened"); end
    $display("mask requests honoured %0d, refused %0d", honoured, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
