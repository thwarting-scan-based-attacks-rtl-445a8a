// tb_scan_attack -- the secure comparator under the attacks it is meant to
// stop, on one scan chain of 8 flip-flops.
//
// The attacker loads a fixed stimulus, lets the circuit capture its (secret)
// response and then tries to learn that response through the pins:
//   1. bitwise reading: all-zero expected stream, Sen lowered after 1 .. 7
//      shift clocks and after 8. Before 8 the pad must read 0 whatever the data;
//      at 8 it may only tell whether the whole response was all zero.
//   2. brute force: every one of the 2^8 expected responses is tried (the
//      stimulus is reloaded for each). Exactly one must pass, and it must be
//      the true response, computed here from the circuit's response formula.
//   3. masking all but one bit (masked comparator, P = 2): the attacker masks
//      7 bits and tries both values of the remaining one. Only 2 masks are
//      honoured, so a guess passes only if the 5 refused bits also match; the
//      pad must follow that rule for every bit position and guess.
module tb_scan_attack
  import scan_tb_pkg::*;
;

  localparam int unsigned N = 8;
  localparam int unsigned P = 2;

  logic       clk = 1'b0;
  logic       sen [2];
  logic [0:0] sexp [2];
  logic [0:0] mask [2];
  logic [0:0] tb_sin [2];
  logic [0:0] sin_dut [2];
  logic [0:0] sout [2];
  wire  [0:0] pad0, pad1;
  int checks = 0, failures = 0;
  int n_withheld = 0, n_brute_pass = 0, n_refused_guesses = 0;

  secure_comparator #(.N_CHAINS(1), .N_SFF(N), .MASKING(1'b0)) u_plain (
    .clk, .sen(sen[0]), .sexp(sexp[0]), .mask(mask[0]), .sin_testres_pad(pad0),
    .sout(sout[0]), .sin_dut(sin_dut[0])
  );
  secure_comparator #(.N_CHAINS(1), .N_SFF(N), .MASKING(1'b1), .P(P)) u_masked (
    .clk, .sen(sen[1]), .sexp(sexp[1]), .mask(mask[1]), .sin_testres_pad(pad1),
    .sout(sout[1]), .sin_dut(sin_dut[1])
  );
  assign pad0 = sen[0] ? tb_sin[0] : 'z;
  assign pad1 = sen[1] ? tb_sin[1] : 'z;

  for (genvar k = 0; k < 2; k++) begin : g_dut
    scan_dut_model #(.N_CHAINS(1), .N_SFF(N)) u_dut (
      .clk, .sen(sen[k]), .sin(sin_dut[k]), .sout(sout[k]),
      .fault_en(1'b0), .fault_chain(0), .fault_pos(0), .fault_val(1'b0)
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the secret the attacker is after
  function automatic logic [N-1:0] true_response(input logic [N-1:0] v);
    logic [N-1:0] r;
    for (int unsigned i = 0; i < N; i++) r[i] = v[(i + N - 1) % N] ^ key_bit(0, i);
    return r;
  endfunction

  // shift n bits (MSB first) of sin_v / exp_v / mask_v into instance k
  task automatic shift(input int k, input logic [N-1:0] sin_v, input logic [N-1:0] exp_v,
                       input logic [N-1:0] mask_v, input int n);
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      sen[k] = 1'b1;
      tb_sin[k] = sin_v[N-1-t];
      sexp[k]   = exp_v[N-1-t];
      mask[k]   = mask_v[N-1-t];
    end
  endtask

  task automatic read_and_capture(input int k, output logic res);
    @(negedge clk);
    sen[k] = 1'b0;
    #1 res = (k == 0) ? pad0[0] : pad1[0];
    @(posedge clk);
  endtask

  // load v and capture its response
  task automatic load(input int k, input logic [N-1:0] v);
    logic dummy;
    shift(k, v, '0, '0, N);
    read_and_capture(k, dummy);
  endtask

  logic [N-1:0] v, r;
  logic         res;

  initial begin
    sen = '{1'b0, 1'b0}; sexp = '{1'b0, 1'b0}; mask = '{1'b0, 1'b0}; tb_sin = '{1'b0, 1'b0};
    v = N'($urandom);
    r = true_response(v);
    repeat (2) @(posedge clk);

    // 1. bitwise reading with an all-zero expected stream
    for (int n = 1; n <= int'(N); n++) begin
      load(0, v);
      shift(0, v, '0, '0, n);
      read_and_capture(0, res);
      checks++;
      if (n < int'(N)) begin
        if (res !== 1'b0) begin failures++; $display("result leaked after %0d clocks", n); end
        else n_withheld++;
      end else if (res !== (r == '0)) begin
        failures++; $display("full-vector result wrong");
      end
    end

    // 2. brute force over all 2^N responses
    for (int g = 0; g < (1 << N); g++) begin
      load(0, v);
      shift(0, v, N'(g), '0, N);
      read_and_capture(0, res);
      checks++;
      if (res !== (N'(g) == r)) begin
        failures++; $display("guess %h: TestRes=%b, true response %h", g, res, r);
      end
      if (res) n_brute_pass++;
    end
    checks++;
    if (n_brute_pass != 1) begin failures++; $display("%0d guesses passed", n_brute_pass); end

    // 3. mask all bits but one, guess the remaining one
    for (int b = 0; b < int'(N); b++)
      for (int gb = 0; gb < 2; gb++) begin
        logic [N-1:0] e, m, compared;
        logic         expect_pass;
        e = '0; e[b] = 1'(gb);
        m = '1; m[b] = 1'b0;
        // the first P requests in shift order (MSB first) are honoured
        compared = '1;
        begin
          automatic int honoured = 0;
          for (int i = int'(N) - 1; i >= 0; i--)
            if (m[i] && honoured < int'(P)) begin compared[i] = 1'b0; honoured++; end
        end
        expect_pass = ((e ^ r) & compared) == '0;
        load(1, v);
        shift(1, v, e, m, N);
        read_and_capture(1, res);
        checks++;
        if (res !== expect_pass) begin
          failures++; $display("mask attack bit %0d guess %0d: TestRes=%b expected %b", b, gb, res, expect_pass);
        end
        if (!expect_pass && (e[b] == r[b])) n_refused_guesses++;
      end

    $display("withheld early reads %0d, brute-force passes %0d, right single-bit guesses rejected %0d",
             n_withheld, n_brute_pass, n_refused_guesses);
    checks++;
    if (n_withheld != int'(N) - 1 || n_refused_guesses == 0) begin
      failures++; $display("an attack case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
