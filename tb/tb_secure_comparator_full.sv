// tb_secure_comparator_full -- the secure comparator at its default size,
// 32 scan chains of 10000 flip-flops, on a behavioural scan circuit of the
// same size.
//
// The testbench acts as the tester for four vectors (about 40000 clocks):
//   1. load stimulus v1 (the first unload holds unknown data and is not read);
//   2. unload response r1 = f(v1) against an expected stream that is correct
//      except one bit of chain 5, while loading v2: TestRes must be 1 on every
//      pad but pad 5;
//   3. unload r2 = f(v2) against the correct expected stream: all pads 1;
//   4. unload against the correct stream but lower Sen one clock early: the
//      result is withheld and every pad reads 0.
// The expected responses are computed in the testbench from the stimuli.
module tb_secure_comparator_full
  import scan_tb_pkg::*;
;

  localparam int unsigned S = 32;
  localparam int unsigned N = 10000;

  typedef logic [N-1:0] vec_t;

  logic         clk = 1'b0;
  logic         sen;
  logic [S-1:0] sexp, mask, tb_sin, sin_dut, sout;
  wire  [S-1:0] pad;
  int           checks = 0, failures = 0;

  vec_t v1 [S];
  vec_t v2 [S];
  vec_t ex [S];

  secure_comparator u_sc (
    .clk, .sen, .sexp, .mask, .sin_testres_pad(pad), .sout, .sin_dut
  );

  assign pad = sen ? tb_sin : 'z;

  scan_dut_model #(.N_CHAINS(S), .N_SFF(N)) u_dut (
    .clk, .sen, .sin(sin_dut), .sout,
    .fault_en(1'b0), .fault_chain(0), .fault_pos(0), .fault_val(1'b0)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5 * N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec_t tb_response(input vec_t v, input int unsigned c);
    vec_t r;
    for (int unsigned i = 0; i < N; i++)
      r[i] = v[(i + N - 1) % N] ^ key_bit(c, i);
    return r;
  endfunction

  task automatic shift(input vec_t sin_v [S], input vec_t exp_v [S], input int n);
    for (int t = 0; t < n; t++) begin
      automatic int idx = int'(N) - 1 - t;
      @(negedge clk);
      sen = 1'b1;
      for (int c = 0; c < int'(S); c++) begin
        tb_sin[c] = sin_v[c][idx];
        sexp[c]   = exp_v[c][idx];
      end
    end
  endtask

  task automatic read_and_capture(input string what, input logic [S-1:0] expected);
    @(negedge clk);
    sen = 1'b0;
    #1;
    checks++;
    if (pad !== expected) begin
      failures++;
      $display("%s: TestRes=%h expected %h", what, pad, expected);
    end
    @(posedge clk);
  endtask

  initial begin
    sen = 1'b0; sexp = '0; mask = '0; tb_sin = '0;
    for (int c = 0; c < int'(S); c++)
      for (int i = 0; i < int'(N); i += 32) begin
        v1[c][i +: 32] = $urandom;
        v2[c][i +: 32] = $urandom;
      end
    @(posedge clk);                                   // capture: clear and load
    // 1. load v1
    shift(v1, v2, int'(N));
    @(negedge clk); sen = 1'b0; @(posedge clk);       // capture r1 = f(v1)
    // 2. unload r1 with one wrong expected bit in chain 5, load v2
    for (int c = 0; c < int'(S); c++) ex[c] = tb_response(v1[c], c);
    ex[5][4321] = ~ex[5][4321];
    shift(v2, ex, int'(N));
    read_and_capture("one wrong bit in chain 5", ~(S'(1) << 5));
    // 3. unload r2 against the correct stream
    for (int c = 0; c < int'(S); c++) ex[c] = tb_response(v2[c], c);
    shift(v1, ex, int'(N));
    #1;
    checks++;
    if (sin_dut !== tb_sin) begin failures++; $display("pads not inputs while shifting"); end
    read_and_capture("all correct", '1);
    // 4. correct stream, one clock short
    for (int c = 0; c < int'(S); c++) ex[c] = tb_response(v1[c], c);
    shift(v2, ex, int'(N) - 1);
    read_and_capture("one clock short", '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
